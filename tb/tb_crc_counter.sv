// Self-checking test of crc_counter.  The testbench produces the stage
// strobes itself (positions 0,1,2,3 in turn) and drives R_count and
// New message with random values, sometimes held for long runs.  For every
// cycle it checks Q_3 = (R_count & New message) ? Q+1 : 0 (modulo 16), that
// Q takes Q_3 in the next position 0 and that Q_1 copies Q.  It also checks
// a full count 0..15 and the wrap to 0 with both inputs held at 1, and that
// the counter clears and stays at 0 while New message is 0.
//
// The counting rule follows the document; the random stimulus is this
// testbench's own choice.
module tb_crc_counter;
  logic       clk = 1'b0;
  logic [3:0] ph;
  logic       r_count, new_message;
  logic [3:0] q_3, q, q_1;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc_counter #(.CW(4)) dut (.clk, .ph, .r_count, .new_message, .q_3, .q, .q_1);

  task automatic step(int p);
    ph = 4'b0001 << p;
    @(posedge clk);
    #1;
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (q=%0d q_3=%0d q_1=%0d)", what, $time, q, q_3, q_1);
    end
  endtask

  // one power-clock cycle with the given inputs; returns the new count
  task automatic cycle(logic rc, logic nm);
    logic [3:0] cur, exp_next;
    r_count = rc; new_message = nm;
    step(0);
    cur = q;
    exp_next = (rc && nm) ? cur + 4'd1 : 4'd0;
    step(1);
    check(q_1 == cur, "Q_1 copies Q");
    step(2);
    step(3);
    check(q_3 == exp_next, "next state in Q_3");
  endtask

  initial begin
    ph = 4'b0000; r_count = 1'b0; new_message = 1'b0;
    // clear: two cycles with enable low
    repeat (2) cycle(1'b0, 1'b1);
    step(0);
    check(q == 4'd0, "cleared to zero");
    step(1); step(2); step(3);
    // full count and wrap
    for (int i = 0; i < 20; i++) begin
      r_count = 1'b1; new_message = 1'b1;
      step(0);
      check(q == 4'(i % 16), "counts up once per cycle");
      step(1); step(2); step(3);
    end
    // New message low holds the counter at zero
    repeat (3) cycle(1'b1, 1'b0);
    for (int i = 0; i < 5; i++) begin
      cycle(1'b1, 1'b0);
      check(q == 4'd0, "held at zero while New message is low");
    end
    // random enables
    for (int i = 0; i < 300; i++) begin
      cycle(($urandom_range(9, 0) != 0), ($urandom_range(9, 0) != 0));
    end
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
