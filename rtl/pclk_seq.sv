// Power-clock sequencer: the digital time base of the power-clock generator.
//
// The adiabatic core is powered by trapezoidal power-clocks whose ramps take
// one ramp time Tr.  This block counts ticks of `clk` (one tick = Tr) and
// emits, for the four stage positions of the core, a one-hot evaluation
// strobe ph[3:0]: a stage in position p takes its new value on the rising
// clk edge that ends a tick with ph[p] = 1.
//   4-phase     : period 4 Tr, one slot per tick, ph = 0001,0010,0100,1000.
//   2-phase     : period 6 Tr (idle is three times E, H or R), two slots of
//                 3 Tr; positions 0/2 follow Phi1 and 1/3 follow Phi2.
//   single-phase: period 4 Tr; the auxiliary clocks Cx and Cxb alternate
//                 cycle by cycle, so each slot is one whole cycle.
// cyc_start marks the first tick of every power-clock cycle.
// The periods (4 Tr, 6 Tr) follow the document; where each slot starts inside
// the period is this model's choice.  The analog stepwise-charging circuit
// that shapes the ramps is not modelled.  rst is synchronous, active high.
module pclk_seq
  import crc_adia_pkg::*;
#(
  parameter pc_scheme_e SCHEME = PC_4PHASE
) (
  input  logic       clk,
  input  logic       rst,
  output logic [3:0] ph,
  output logic       cyc_start
);

  // Length of the full slot pattern in ticks: one cycle for 4-phase and
  // 2-phase, two cycles (Cx then Cxb) for single-phase.
  localparam int TPS    = ticks_per_slot(SCHEME);
  localparam int TPC    = ticks_per_cycle(SCHEME);
  localparam int PERIOD = TPS * slots_of(SCHEME);

  logic [3:0] tick;
  logic       slot0, slot1;

  always_ff @(posedge clk) begin
    if (rst || tick == 4'(PERIOD - 1)) tick <= '0;
    else                               tick <= tick + 4'd1;
  end

  assign slot0 = (tick == 4'd0);
  assign slot1 = (tick == 4'(TPS));

  always_comb begin
    if (SCHEME == PC_4PHASE) ph = 4'b0001 << tick[1:0];
    else                     ph = {slot1, slot0, slot1, slot0};
  end

  assign cyc_start = (tick == 4'd0) || (tick == 4'(TPC) && PERIOD > TPC);

endmodule
