// Message word-length test of crc_adia_top: the same 16-bit CRC over 64-,
// 128- and 256-bit message words with the 4-phase power clock.  For each
// length every retained CRC is checked against the reference, and the
// latency from counter start to CRC in the register unit must be 4k + 11
// phases for a k-bit word (75, 267, 523 and 1035 phases for k = 16 ... 256,
// i.e. 18.75 to 258.75 power-clock cycles).
//
// The word lengths are those of the document's computation-time plot; the
// 4k + 11 rule is worked out from the stage counts of this design.
module tb_crc_adia_wordlen;
  import crc_adia_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NL = 3;
  localparam int LENS [NL] = '{64, 128, 256};

  int   chk [NL];
  int   fail[NL];
  logic dn  [NL];

  for (genvar k = 0; k < NL; k++) begin : g_len
    localparam int K = LENS[k];
    logic           pc_rst, res, new_message, r_count, wait_n, pc_cycle;
    logic [K-1:0]   msg, m_out;
    logic [15:0]    init, crc_out;
    logic [15:1]    gpoly;
    logic [3:0]     pc_ph;

    crc_adia_top #(.SCHEME(PC_4PHASE), .CRC_W(16), .MSG_W(K)) dut (
      .clk, .pc_rst, .res, .new_message, .msg, .gpoly, .init,
      .m_out, .crc_out, .r_count, .wait_n, .pc_ph, .pc_cycle
    );

    crc_top_driver #(.SCHEME(PC_4PHASE), .CRC_W(16), .MSG_W(K), .RX(1'b0), .ROUNDS(8)) drv (
      .clk, .pc_rst, .res, .new_message, .msg, .gpoly, .init,
      .m_out, .crc_out, .r_count, .wait_n,
      .checks(chk[k]), .failures(fail[k]), .done(dn[k])
    );
  end

  initial begin
    #1 wait (dn[0] && dn[1] && dn[2]);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2],
             fail[0] + fail[1] + fail[2]);
    $finish;
  end

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2],
             fail[0] + fail[1] + fail[2] + 1);
    $finish;
  end

endmodule
