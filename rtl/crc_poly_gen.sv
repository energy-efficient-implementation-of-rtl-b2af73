// Generator polynomial unit of the CRC datapath.
//
// One bit block per coefficient g1..g(W-1) (g0 and gW are always 1 and need
// no block).  Bit block i is an AND gate and a 2:1 multiplexer:
//   position 3: sel_i = R0 AND g_i
//   position 0: gp_i  = sel_i ? (IN xor CR15) : ZERO
// gp_i goes to the XOR gate of CRC bit block i.  With R0 = 0 (reset and wait)
// no feedback reaches the CRC unit.  Structure and positions follow the
// document's datapath figure; the polynomial is an input, so any generator
// polynomial of this width can be used.
module crc_poly_gen #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic [3:0]   ph,
  input  logic         r0,     // position 2
  input  logic [W-1:1] g,      // g(W-1)..g1, static during a message
  input  logic         fb,     // IN xor CR(W-1), position 3
  output logic [W-1:1] gp      // position 0
);

  logic [W-1:1] sel;

  always_ff @(posedge clk) begin
    if (ph[3]) sel <= g & {(W-1){r0}};
    if (ph[0]) gp  <= sel & {(W-1){fb}};   // sel ? fb : 1'b0
  end

endmodule
