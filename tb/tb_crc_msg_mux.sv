// Self-checking test of crc_msg_mux.  For random 16-bit words and counts,
// and for every count 0..15 of fixed words, the testbench presents the count
// on Q_3, Q and Q_1 (read in positions 0, 1 and 2), steps one power-clock
// cycle and checks IN = msg[15 - count] in position 2: count 0 sends the
// most significant bit, as in the frame where the MSB is transmitted first.
//
// MSB-first order follows the document; the select positions checked are
// this design's own choice.
module tb_crc_msg_mux;
  logic        clk = 1'b0;
  logic [3:0]  ph;
  logic [15:0] msg;
  logic [3:0]  q_3, q, q_1;
  logic        in_bit;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc_msg_mux #(.MW(16), .CW(4)) dut (.clk, .ph, .msg, .q_3, .q, .q_1, .in_bit);

  task automatic step(int p);
    ph = 4'b0001 << p;
    @(posedge clk);
    #1;
  endtask

  task automatic one(logic [15:0] m, logic [3:0] c);
    msg = m; q_3 = c; q = c; q_1 = c;
    step(3);
    step(0);
    step(1);
    step(2);
    checks++;
    if (in_bit !== m[15 - c]) begin
      failures++;
      $display("FAIL msg=%h count=%0d got %b", m, c, in_bit);
    end
  endtask

  initial begin
    ph = 4'b0000;
    for (int c = 0; c < 16; c++) one(16'h482C, 4'(c));
    for (int c = 0; c < 16; c++) one(16'h8000 >> c, 4'(c));
    for (int c = 0; c < 16; c++) one(~(16'h8000 >> c), 4'(c));
    for (int i = 0; i < 400; i++) one(16'($urandom()), 4'($urandom()));
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
