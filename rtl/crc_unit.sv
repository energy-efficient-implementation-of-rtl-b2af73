// CRC unit: the W bit blocks of the adiabatic bit-serial LFSR.
//
// Every bit block is four gates deep, so one step of the LFSR takes one
// power-clock cycle and the register state CR is valid in position 2.
//   LSB block (bit 0):
//     position 3: fb  = IN xor CR(W-1)            (also sent to poly_gen)
//     position 0: synchronisation buffer
//     position 1: resettable buffer, output forced to 0 while R2 = 0
//     position 2: CR0 = R3 ? b0 : buffer output
//   identical block i = 1..W-1:
//     position 3: synchronisation buffer of CR(i-1)
//     position 0: resettable buffer, forced to 0 while R1 = 0
//     position 1: XOR with gp_i from the polynomial unit
//     position 2: CRi = R3 ? b_i : XOR output
// One step therefore computes CR' = {CR[W-2:0], 0} xor (fb ? {g, 1} : 0),
// the MSB-first CRC of the document.  Gate order, positions and the use of
// R1, R2, R3 and b0..b(W-1) follow the document's datapath figure; the reset
// polarity (resettable buffers pass while R1/R2 = 1) is this model's reading.
module crc_unit #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic [3:0]   ph,
  input  logic         in_bit,  // serial message, position 2
  input  logic         r1,      // position 3
  input  logic         r2,      // position 0
  input  logic         r3,      // position 1
  input  logic [W-1:0] init,    // preset b(W-1)..b0
  input  logic [W-1:1] gp,      // from poly_gen, position 0
  output logic         fb,      // position 3
  output logic [W-1:0] cr       // position 2
);

  logic [W-1:0] s_buf;   // position 3 (bits 1..) / position 0 (bit 0)
  logic [W-1:0] s_res;   // position 0 (bits 1..) / position 1 (bit 0)
  logic [W-1:1] s_xor;   // position 1

  always_ff @(posedge clk) begin
    // LSB block
    if (ph[3]) fb       <= in_bit ^ cr[W-1];
    if (ph[0]) s_buf[0] <= fb;
    if (ph[1]) s_res[0] <= s_buf[0] & r2;
    if (ph[2]) cr[0]    <= r3 ? init[0] : s_res[0];
    // identical blocks
    for (int i = 1; i < W; i++) begin
      if (ph[3]) s_buf[i] <= cr[i-1];
      if (ph[0]) s_res[i] <= s_buf[i] & r1;
      if (ph[1]) s_xor[i] <= s_res[i] ^ gp[i];
      if (ph[2]) cr[i]    <= r3 ? init[i] : s_xor[i];
    end
  end

endmodule
