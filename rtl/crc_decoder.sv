// Controller decoder: makes the synchronisation signals of the adiabatic CRC.
//
// R_count = NOT(count is all ones OR RES).  It is 1 while a message is being
// processed and drops for one cycle when the counter reaches 1111, or for as
// long as RES is high.  A chain of buffers then delays it so that each unit
// of the datapath sees it in the stage position where it is used:
//   R_count  position 3   counter enable
//   R0       position 2   R_count + 3 stages, gates the feedback (AND g_i)
//   R1       position 3   R0 + 1 stage, resettable buffers of bit blocks 1..n-1
//   R2       position 0   R1 + 1 stage, resettable buffer of the LSB block
//   R3       position 1   NOT R2 + 1 stage, selects the preset when 1
//   R4       position 1   NOT R3 delayed by four gates, RET (active low) of
//                         the register unit's retain buffers
// The gate order (three-level all-ones detect with RES at the last level,
// three buffers to R0, one stage each to R1, R2, R3, four to R4) follows the
// document's decoder figure.  The polarities, with R_count, R0, R1, R2 and R4
// high during computation and R3 low, are this model's reading of the text:
// R0 enables the feedback, R3 loads the preset when high and R4 is the
// inverse of R3.  In dual-rail adiabatic logic the inversions are free.
module crc_decoder #(
  parameter int CW = 4
) (
  input  logic          clk,
  input  logic [3:0]    ph,
  input  logic [CW-1:0] q,        // counter state, position 0
  input  logic          res,      // external reset, active high
  output logic          r_count,  // position 3
  output logic          r0,       // position 2
  output logic          r1,       // position 3
  output logic          r2,       // position 0
  output logic          r3,       // position 1
  output logic          r4        // position 1
);

  localparam int HALF = CW / 2;

  logic lo_ones, hi_ones, all_ones;
  logic b0, b1;        // buffers between R_count and R0
  logic w0, w1, w2;    // buffers between R3 and R4

  always_ff @(posedge clk) begin
    if (ph[1]) begin
      lo_ones <= &q[HALF-1:0];
      hi_ones <= &q[CW-1:HALF];
      b1      <= b0;
      r3      <= ~r2;
      r4      <= ~w2;
    end
    if (ph[2]) begin
      all_ones <= lo_ones & hi_ones;
      r0       <= b1;
      w0       <= r3;
    end
    if (ph[3]) begin
      r_count <= ~(all_ones | res);
      r1      <= r0;
      w1      <= w0;
    end
    if (ph[0]) begin
      b0 <= r_count;
      r2 <= r1;
      w2 <= w1;
    end
  end

endmodule
