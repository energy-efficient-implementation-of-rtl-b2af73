// Test multiplexer: feeds the message word to the CRC datapath one bit per
// power-clock cycle, most significant bit first.
//
// For counter value c the output is msg[MW-1-c], so count 0 sends the MSB
// (Bit0 of the frame, the first bit transmitted).  The 16:1 selection is
// split over three stage positions so that each level uses the copy of the
// count that is valid in the preceding position:
//   position 0: 4:1 within each group of four, selects Q_3[1:0]
//   position 1: 2:1 between groups, select Q[2]
//   position 2: final selection, select Q_1[CW-1:3]   -> IN (position 2)
// The three-stage depth and the select copies follow the document; the
// split into 4:1, 2:1 and 2:1 levels is this model's choice.  MW must be a
// power of two and at least 16.
module crc_msg_mux #(
  parameter int MW = 16,
  parameter int CW = $clog2(MW)
) (
  input  logic          clk,
  input  logic [3:0]    ph,
  input  logic [MW-1:0] msg,     // message word, msg[MW-1] sent first
  input  logic [CW-1:0] q_3,     // count, position 3
  input  logic [CW-1:0] q,       // count, position 0
  input  logic [CW-1:0] q_1,     // count, position 1
  output logic          in_bit   // serial message, position 2
);

  localparam int NG = MW / 4;    // groups of four after the first level
  localparam int NP = MW / 8;    // pairs of groups after the second level

  logic [MW-1:0] by_count;       // by_count[c] = bit sent at count c
  logic [NG-1:0] grp;
  logic [NP-1:0] pair;

  always_comb begin
    for (int c = 0; c < MW; c++) by_count[c] = msg[MW-1-c];
  end

  always_ff @(posedge clk) begin
    if (ph[0]) begin
      for (int g = 0; g < NG; g++) grp[g] <= by_count[4*g + int'(q_3[1:0])];
    end
    if (ph[1]) begin
      for (int p = 0; p < NP; p++) pair[p] <= grp[2*p + int'(q[2])];
    end
    if (ph[2]) in_bit <= pair[q_1[CW-1:3]];
  end

endmodule
