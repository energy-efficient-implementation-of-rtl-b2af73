// Self-checking test of crc_poly_gen.  R0 and g are taken in position 3, the
// feedback IN xor CR15 in position 0; gp_i must be fb when R0 AND g_i, else
// zero.  Covered: the NFC polynomial 0x8810 with R0 = 1 and 0, all-ones and
// random polynomials, both feedback values.
//
// The AND-then-select rule follows the document; the positions checked are
// this design's own choice.
module tb_crc_poly_gen;
  import crc_adia_pkg::*;

  logic        clk = 1'b0;
  logic [3:0]  ph;
  logic        r0, fb;
  logic [15:1] g, gp;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc_poly_gen #(.W(16)) dut (.clk, .ph, .r0, .g, .fb, .gp);

  task automatic step(int p);
    ph = 4'b0001 << p;
    @(posedge clk);
    #1;
  endtask

  task automatic one(logic rr, logic [15:1] gg, logic f);
    logic [15:1] exp_gp;
    r0 = rr; g = gg; fb = f;
    step(3);
    step(0);
    for (int i = 1; i < 16; i++) exp_gp[i] = (rr && gg[i]) ? f : 1'b0;
    checks++;
    if (gp !== exp_gp) begin
      failures++;
      $display("FAIL r0=%b g=%h fb=%b gp=%h expected %h", rr, gg, f, gp, exp_gp);
    end
    step(1);
    step(2);
  endtask

  initial begin
    ph = 4'b0000;
    one(1'b1, NFC_GPOLY, 1'b1);
    checks++;
    if (gp != 15'h0810) begin
      failures++;
      $display("FAIL NFC polynomial taps are not g5 and g12");
    end
    one(1'b1, NFC_GPOLY, 1'b0);
    one(1'b0, NFC_GPOLY, 1'b1);
    one(1'b1, '1, 1'b1);
    one(1'b0, '1, 1'b1);
    for (int i = 0; i < 400; i++) one(1'($urandom()), 15'($urandom()), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
