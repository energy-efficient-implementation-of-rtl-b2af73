// Self-checking test of crc_unit (16 bit blocks).  The testbench plays the
// controller and the polynomial unit: in each power-clock cycle (positions
// 3, 0, 1, 2) it presents the message bit, reads fb in position 3, returns
// gp = g & fb (zero while the resets are active), and sets R1, R2 and R3.  Per word: one load cycle (R1 = R2 =
// 0, R3 = 1) must put the preset on CR; then 16 message bits, after each of
// which CR must equal a bit-serial reference CRC (MSB first).  Words use the
// NFC polynomial and presets 0x6363 and 0x0000, and random polynomials and
// presets.  Cycles with R1/R2 = 0 but R3 = 0 must clear CR to zero.
//
// The bit-block structure and the CRC rule follow the document; the reset
// polarities driven here are this design's own choice.
module tb_crc_unit;
  import crc_adia_pkg::*;

  logic        clk = 1'b0;
  logic [3:0]  ph;
  logic        in_bit, r1, r2, r3, fb;
  logic [15:0] init, cr;
  logic [15:1] gp, g;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc_unit #(.W(16)) dut (.clk, .ph, .in_bit, .r1, .r2, .r3, .init, .gp, .fb, .cr);

  task automatic step(int p);
    ph = 4'b0001 << p;
    @(posedge clk);
    #1;
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (cr=%h)", what, $time, cr);
    end
  endtask

  // one cycle of the datapath
  task automatic cycle(logic b, logic rr1, logic rr2, logic rr3);
    in_bit = b; r1 = rr1; r2 = rr2; r3 = rr3;
    step(3);
    gp = rr1 ? (g & {15{fb}}) : '0;   // R0 has the polarity of R1
    step(0);
    step(1);
    step(2);
  endtask

  task automatic word(logic [15:0] m, logic [15:1] gg, logic [15:0] p);
    logic [15:0] ref_c;
    logic        f;
    g = gg; init = p;
    cycle(1'b0, 1'b0, 1'b0, 1'b1);
    check(cr == p, "preset loaded");
    ref_c = p;
    for (int i = 15; i >= 0; i--) begin
      cycle(m[i], 1'b1, 1'b1, 1'b0);
      f = m[i] ^ ref_c[15];
      ref_c = {ref_c[14:0], 1'b0} ^ ({gg, 1'b1} & {16{f}});
      check(cr == ref_c, "CRC after each bit");
    end
  endtask

  initial begin
    ph = 4'b0000; in_bit = 1'b0; r1 = 1'b0; r2 = 1'b0; r3 = 1'b1;
    g = NFC_GPOLY; init = PRESET_106K; gp = '0;
    // a bit-block clear: resettable buffers forced to zero, no preset
    cycle(1'b1, 1'b0, 1'b0, 1'b0);
    cycle(1'b1, 1'b0, 1'b0, 1'b0);
    check(cr == 16'h0000, "resettable buffers clear the datapath");
    word(16'h482C, NFC_GPOLY, PRESET_106K);
    word(16'h482C, NFC_GPOLY, PRESET_212K_424K);
    word(16'h0000, NFC_GPOLY, PRESET_106K);
    word(16'hFFFF, NFC_GPOLY, PRESET_212K_424K);
    for (int i = 0; i < 40; i++)
      word(16'($urandom()), (i % 2) ? NFC_GPOLY : 15'($urandom()), 16'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
