// Controller counter: 4-bit state counter of the adiabatic CRC.
//
// The counter advances once per power-clock cycle while both R_count (from
// the decoder) and New message are 1, and clears to zero as soon as either
// is 0; R_count drops at count all-ones or on RES, so the counter wraps to
// 0000 and the decoder restarts the CRC.  It is four stages deep:
//   position 0: en = R_count AND New message; Q = Q_3 (output buffer)
//   position 1: next state (en ? Q+1 : 0); Q_1 = Q (extra buffer)
//   position 2, 3: the rest of the next-state logic, ending in Q_3.
// Q_3, Q and Q_1 carry the same count one position apart and act as the
// select lines of the test multiplexer (Q0_3, Q1_3, Q2, Q3_1 in the 16-bit
// design).  The stage depths and output copies follow the document's counter
// figure; computing the whole next state in the first of the three logic
// stages, instead of spreading the gates, is this model's simplification.
// Stages have no reset of their own: RES clears the counter through R_count.
module crc_counter #(
  parameter int CW = 4
) (
  input  logic          clk,
  input  logic [3:0]    ph,          // stage strobes from pclk_seq
  input  logic          r_count,     // position 3, from the decoder
  input  logic          new_message, // external, active high
  output logic [CW-1:0] q_3,         // position 3
  output logic [CW-1:0] q,           // position 0
  output logic [CW-1:0] q_1          // position 1
);

  logic          en;
  logic [CW-1:0] nxt1, nxt2;

  always_ff @(posedge clk) begin
    if (ph[0]) begin
      en <= r_count & new_message;
      q  <= q_3;
    end
    if (ph[1]) begin
      nxt1 <= en ? q + CW'(1) : '0;
      q_1  <= q;
    end
    if (ph[2]) nxt2 <= nxt1;
    if (ph[3]) q_3  <= nxt2;
  end

endmodule
