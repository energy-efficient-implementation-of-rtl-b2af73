// Delay cell: a chain of adiabatic buffers that holds back the serial message
// so that it reaches the register unit together with the CRC value.
//
// The input is taken in stage position IN_POS; stage k of the chain sits in
// position IN_POS+1+k (mod 4).  With the default DEPTH = 4 the output is the
// input one power-clock cycle later, in the same position, matching the four
// gates of one CRC bit block.  Depth four follows the document; the bit is
// passed unchanged.
module crc_delay_cell #(
  parameter int DEPTH  = 4,
  parameter int IN_POS = 2
) (
  input  logic       clk,
  input  logic [3:0] ph,
  input  logic       d,       // position IN_POS
  output logic       q        // position IN_POS + DEPTH (mod 4)
);

  logic [DEPTH-1:0] st;

  always_ff @(posedge clk) begin
    for (int k = 0; k < DEPTH; k++) begin
      if (ph[(IN_POS + 1 + k) % 4]) st[k] <= (k == 0) ? d : st[k-1];
    end
  end

  assign q = st[DEPTH-1];

endmodule
