// Full-size test of crc_adia_top at its default parameters (4-phase power
// clock, 16-bit CRC, 16-bit message): a series of NFC words checked against
// a reference CRC, with the New message, RES and preset/polynomial changes
// of crc_top_driver.  Time unit: one clk period is one ramp time Tr.
//
// The sizes are the document's (16-bit NFC CRC, 16-bit word); the number of
// words and the watchdog are this testbench's own choice.
module tb_crc_adia_full;
  import crc_adia_pkg::*;

  logic        clk = 1'b0;
  logic        pc_rst, res, new_message, r_count, wait_n, pc_cycle;
  logic [15:0] msg, init, m_out, crc_out;
  logic [15:1] gpoly;
  logic [3:0]  pc_ph;
  int          checks, failures;
  logic        done;

  always #5 clk = ~clk;

  crc_adia_top dut (
    .clk, .pc_rst, .res, .new_message, .msg, .gpoly, .init,
    .m_out, .crc_out, .r_count, .wait_n, .pc_ph, .pc_cycle
  );

  crc_top_driver #(.SCHEME(PC_4PHASE), .CRC_W(16), .MSG_W(16), .RX(1'b0), .ROUNDS(12)) drv (
    .clk, .pc_rst, .res, .new_message, .msg, .gpoly, .init,
    .m_out, .crc_out, .r_count, .wait_n, .checks, .failures, .done
  );

  initial begin
    #1 wait (done);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
