// Self-checking test of crc_register_unit (16 message bits, 16 CRC bits).
// Each power-clock cycle (positions 3, 0, 1, 2) the testbench presents IN_d
// and CR (read in position 3) and RET (= R4, read in position 2).  Reference:
// while RET is 1 the CRC registers take CR and the message chain shifts in
// IN_d (m_out[0] newest) in the same cycle; while RET is 0 both outputs keep
// their values.  RET is low in single cycles, in runs, and at random.
//
// Retention while RET is low follows the document; the serial message chain
// checked here is this design's own choice.
module tb_crc_register_unit;
  logic        clk = 1'b0;
  logic [3:0]  ph;
  logic        in_d, ret;
  logic [15:0] cr, m_out, crc_out;
  logic [15:0] m_ref, c_ref;
  int          checks = 0, failures = 0;
  int          n_hold = 0;

  always #5 clk = ~clk;

  crc_register_unit #(.MW(16), .CW(16)) dut (.clk, .ph, .in_d, .cr, .ret, .m_out, .crc_out);

  task automatic step(int p);
    ph = 4'b0001 << p;
    @(posedge clk);
    #1;
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (m=%h crc=%h, expected %h %h)", what, $time,
               m_out, crc_out, m_ref, c_ref);
    end
  endtask

  task automatic cycle(logic rt);
    in_d = 1'($urandom());
    cr   = 16'($urandom());
    ret  = rt;
    step(3);
    step(0);
    step(1);
    step(2);
    if (rt) begin
      m_ref = {m_ref[14:0], in_d};
      c_ref = cr;
    end else begin
      n_hold++;
    end
  endtask

  initial begin
    ph = 4'b0000;
    m_ref = '0; c_ref = '0;
    // fill: 16 shifting cycles make the whole chain known
    for (int i = 0; i < 16; i++) cycle(1'b1);
    check(crc_out == c_ref, "CRC registers take CR");
    check(m_out == m_ref, "message chain after 16 shifts");
    for (int i = 0; i < 600; i++) begin
      if (i % 50 < 3)       cycle(1'b0);          // runs of holds
      else if (i % 17 == 0) cycle(1'b0);          // single holds
      else                  cycle(($urandom_range(7, 0) != 0));
      check(crc_out == c_ref, "CRC registers");
      check(m_out == m_ref, "message chain");
    end
    check(n_hold > 20, "holds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (8000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
