// Self-checking test of crc_delay_cell (four stages, input in position 2).
// A random bit enters in every position-2 slot; the output, read in the
// next cycle's position 2, must be the bit of the previous cycle, and must
// not yet show the new bit in positions 3, 0 and 1 (a latency of exactly
// four gates).
//
// The four-gate depth follows the document; the input position is this
// design's own choice.
module tb_crc_delay_cell;
  logic       clk = 1'b0;
  logic [3:0] ph;
  logic       d, q;
  logic       prev;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc_delay_cell #(.DEPTH(4), .IN_POS(2)) dut (.clk, .ph, .d, .q);

  task automatic step(int p);
    ph = 4'b0001 << p;
    @(posedge clk);
    #1;
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    ph = 4'b0000;
    d = 1'b0;
    repeat (2) begin step(3); step(0); step(1); step(2); end
    prev = 1'b0;
    for (int i = 0; i < 500; i++) begin
      d = 1'($urandom());
      step(3);
      d = ~d;                      // a change after position 3 must not leak
      check(q == prev, "output unchanged in position 3");
      step(0);
      check(q == prev, "output unchanged in position 0");
      step(1);
      check(q == prev, "output unchanged in position 1");
      step(2);
      check(q == ~d, "bit taken in position 3 out after four gates");
      prev = q;
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
