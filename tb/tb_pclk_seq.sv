// Self-checking test of pclk_seq for the three power-clocking schemes.
// Checks, over many periods: the number of strobes per position in a
// power-clock cycle, the spacing between consecutive slots (1, 3 and 4 Tr),
// the cycle length (4 Tr, 6 Tr, 4 Tr), that positions 0/2 and 1/3 share a
// strobe in the two-slot schemes, that the 4-phase strobes are one-hot and
// visit positions 0,1,2,3 in order, and that rst restarts at position 0.
//
// The cycle lengths follow the document; the slot offsets checked are this
// design's own choice.
module tb_pclk_seq;
  import crc_adia_pkg::*;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [3:0] ph4, ph2, ph1;
  logic       cs4, cs2, cs1;

  pclk_seq #(.SCHEME(PC_4PHASE)) u4 (.clk, .rst, .ph(ph4), .cyc_start(cs4));
  pclk_seq #(.SCHEME(PC_2PHASE)) u2 (.clk, .rst, .ph(ph2), .cyc_start(cs2));
  pclk_seq #(.SCHEME(PC_1PHASE)) u1 (.clk, .rst, .ph(ph1), .cyc_start(cs1));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Record, for each scheme, the tick numbers of slot strobes and cycle starts.
  int tick;
  int last_s0[3], last_s1[3], last_cs[3];
  int n_s0[3], n_cs[3];
  int exp_pos;

  initial begin
    rst = 1'b1;
    tick = 0;
    for (int k = 0; k < 3; k++) begin
      last_s0[k] = -1; last_s1[k] = -1; last_cs[k] = -1; n_s0[k] = 0; n_cs[k] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // right after reset every scheme is in slot 0 / cycle start
    check(ph4 == 4'b0001, "4-phase starts at position 0");
    check(ph2 == 4'b0101 && ph1 == 4'b0101, "two-slot schemes start in slot 0");
    check(cs4 && cs2 && cs1, "cycle start after reset");
    exp_pos = 0;
    repeat (240) begin
      // sample the strobes valid during this tick
      check(ph4 == (4'b0001 << exp_pos), "4-phase one-hot in order");
      exp_pos = (exp_pos + 1) % 4;
      check(ph2[0] == ph2[2] && ph2[1] == ph2[3] && !(ph2[0] && ph2[1]), "2-phase slot sharing");
      check(ph1[0] == ph1[2] && ph1[1] == ph1[3] && !(ph1[0] && ph1[1]), "1-phase slot sharing");
      check(!(cs4 ^ ph4[0]), "4-phase cycle starts with Phi1");
      begin
        logic s0 [3];
        logic s1 [3];
        logic cs [3];
        int   tps [3];
        int   tpc [3];
        s0[0] = ph4[0]; s1[0] = ph4[1]; cs[0] = cs4; tps[0] = 1; tpc[0] = 4;
        s0[1] = ph2[0]; s1[1] = ph2[1]; cs[1] = cs2; tps[1] = 3; tpc[1] = 6;
        s0[2] = ph1[0]; s1[2] = ph1[1]; cs[2] = cs1; tps[2] = 4; tpc[2] = 4;
        for (int k = 0; k < 3; k++) begin
          if (s0[k]) begin
            if (last_s0[k] >= 0) check(tick - last_s0[k] == ((k == 0) ? 4 : 2 * tps[k]), "slot 0 period");
            last_s0[k] = tick; n_s0[k]++;
          end
          if (s1[k]) begin
            check(last_s0[k] >= 0 && tick - last_s0[k] == tps[k], "slot 1 follows slot 0 by one slot");
            last_s1[k] = tick;
          end
          if (cs[k]) begin
            if (last_cs[k] >= 0) check(tick - last_cs[k] == tpc[k], "power-clock cycle length");
            last_cs[k] = tick; n_cs[k]++;
          end
        end
      end
      @(posedge clk);
      #1 tick++;
    end
    check(n_s0[0] == 60 && n_s0[1] == 40 && n_s0[2] == 30, "number of slot-0 strobes");
    check(n_cs[0] == 60 && n_cs[1] == 40 && n_cs[2] == 60, "number of power-clock cycles");
    // synchronous restart in the middle of a period
    @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    check(ph4 == 4'b0001 && ph2 == 4'b0101 && ph1 == 4'b0101, "restart at position 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
