// Self-checking test of crc_decoder.  Each power-clock cycle n the testbench
// presents a count Q (position 0) and RES (position 3) and records the
// expected R_count(n) = NOT(Q == 1111 OR RES).  It then checks every output
// in its own position and cycle:
//   R_count : position 3 of cycle n       R0 : position 2 of cycle n+1
//   R1      : position 3 of cycle n+1     R2 : position 0 of cycle n+2
//   R3      : position 1 of cycle n+2, inverted
//   R4      : position 1 of cycle n+3 (R3 inverted, four gates later)
// Counts run 0..15 repeatedly with RES pulses and random values in between.
//
// The R_count rule follows the document; the output positions and the
// polarities checked are this design's own choice (see crc_decoder).
module tb_crc_decoder;
  logic       clk = 1'b0;
  logic [3:0] ph;
  logic [3:0] q;
  logic       res;
  logic       r_count, r0, r1, r2, r3, r4;
  int         checks = 0, failures = 0;
  logic       exp_rc [0:2047];
  int         n;
  int         n_low;

  always #5 clk = ~clk;

  crc_decoder #(.CW(4)) dut (.clk, .ph, .q, .res, .r_count, .r0, .r1, .r2, .r3, .r4);

  task automatic step(int p);
    ph = 4'b0001 << p;
    @(posedge clk);
    #1;
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s in cycle %0d at %0t", what, n, $time);
    end
  endtask

  initial begin
    ph = 4'b0000; q = 4'd0; res = 1'b1;
    n_low = 0;
    for (n = 0; n < 1200; n++) begin
      // inputs of this cycle
      if (n < 400)      q = 4'(n);
      else              q = 4'($urandom());
      res = (n < 4) || (n % 97 == 50) || (n % 97 == 51) || ($urandom_range(40, 0) == 0);
      exp_rc[n] = ~((q == 4'hF) | res);
      if (!exp_rc[n]) n_low++;
      step(0);
      if (n >= 2) check(r2 == exp_rc[n-2], "R2");
      step(1);
      if (n >= 2) check(r3 == ~exp_rc[n-2], "R3");
      if (n >= 3) check(r4 == exp_rc[n-3], "R4");
      step(2);
      if (n >= 1) check(r0 == exp_rc[n-1], "R0");
      step(3);
      check(r_count == exp_rc[n], "R_count");
      if (n >= 1) check(r1 == exp_rc[n-1], "R1");
    end
    check(n_low > 50, "R_count low often enough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
