// CRC-width test of crc_adia_top: the same design with fewer or more CRC bit
// blocks, as the datapath is built from identical slices plus one LSB slice.
//   c8  : 8-bit CRC over 16-bit words            (4-phase)
//   c32 : 32-bit CRC over 32-bit words           (4-phase)
//   r8  : 8-bit CRC, receiver check on 8 data bits + 8 CRC bits
//   r32 : 32-bit CRC, receiver check on 32 data bits + 32 CRC bits
// Each instance is run by crc_top_driver: every retained CRC and message
// word is compared with a bit-serial reference (MSB first), the latency must
// still be 4*MSG_W + 11 phases, and the receiver instances must see a zero
// remainder for a clean word and a non-zero one after a bit flip.  The
// polynomial is random in every third word, and the presets are the NFC
// values cut to or widened to the CRC width.
// Scaling the CRC by adding or removing bit blocks follows the document; the
// widths, word lengths and polynomials used here are this testbench's own
// choice.
module tb_crc_adia_crcwidth;
  import crc_adia_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  localparam int CWS [NC] = '{8, 32, 8, 32};
  localparam int MWS [NC] = '{16, 32, 16, 64};
  localparam bit RXS [NC] = '{1'b0, 1'b0, 1'b1, 1'b1};

  int   chk [NC];
  int   fail[NC];
  logic dn  [NC];

  for (genvar k = 0; k < NC; k++) begin : g_cfg
    localparam int C = CWS[k];
    localparam int M = MWS[k];
    logic           pc_rst, res, new_message, r_count, wait_n, pc_cycle;
    logic [M-1:0]   msg, m_out;
    logic [C-1:0]   init, crc_out;
    logic [C-1:1]   gpoly;
    logic [3:0]     pc_ph;

    crc_adia_top #(.SCHEME(PC_4PHASE), .CRC_W(C), .MSG_W(M)) dut (
      .clk, .pc_rst, .res, .new_message, .msg, .gpoly, .init,
      .m_out, .crc_out, .r_count, .wait_n, .pc_ph, .pc_cycle
    );

    crc_top_driver #(.SCHEME(PC_4PHASE), .CRC_W(C), .MSG_W(M), .RX(RXS[k]), .ROUNDS(10)) drv (
      .clk, .pc_rst, .res, .new_message, .msg, .gpoly, .init,
      .m_out, .crc_out, .r_count, .wait_n,
      .checks(chk[k]), .failures(fail[k]), .done(dn[k])
    );
  end

  initial begin
    #1 wait (dn[0] && dn[1] && dn[2] && dn[3]);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3]);
    $finish;
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end

endmodule
