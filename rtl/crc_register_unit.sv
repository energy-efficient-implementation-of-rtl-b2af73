// Register unit: holds the message word and its CRC for the wait period.
//
// Every single-bit register is four stages: three buffers (positions 3, 0, 1)
// and a retain buffer (position 2).  While RET (= R4, active low) is 1 the
// retain buffer takes the new value; while it is 0 the output keeps its
// value, which is what the cross-coupled pair of the retain gate does.
//   CRC part: MW registers in parallel, register i fed by CRi.
//   Message part: MW registers in a chain fed by IN_d, so that the word
//   shifts in one bit per cycle, m_out[0] receiving the newest bit.  After
//   the last bit the chain holds the whole word in the order of the input.
// With the decoder's timing the final CRC enters the retain stage one slot
// before RET drops, so the CRC and the message stay on the outputs for two
// power-clock cycles.  The four-stage register and the active-low RET
// follow the document; the serial-in chain for the message bits is this
// model's reading of how the serial IN_d becomes the parallel word M.
module crc_register_unit #(
  parameter int MW = 16,
  parameter int CW = 16
) (
  input  logic          clk,
  input  logic [3:0]    ph,
  input  logic          in_d,     // delayed serial message, position 2
  input  logic [CW-1:0] cr,       // CRC unit state, position 2
  input  logic          ret,      // R4, active-low retain, position 1
  output logic [MW-1:0] m_out,    // position 2
  output logic [CW-1:0] crc_out   // position 2
);

  logic [MW-1:0] m_st1, m_st2, m_st3;
  logic [CW-1:0] c_st1, c_st2, c_st3;
  logic [MW-1:0] m_in;

  assign m_in = {m_out[MW-2:0], in_d};

  always_ff @(posedge clk) begin
    if (ph[3]) begin
      m_st1 <= m_in;
      c_st1 <= cr;
    end
    if (ph[0]) begin
      m_st2 <= m_st1;
      c_st2 <= c_st1;
    end
    if (ph[1]) begin
      m_st3 <= m_st2;
      c_st3 <= c_st2;
    end
    if (ph[2] && ret) begin
      m_out   <= m_st3;
      crc_out <= c_st3;
    end
  end

endmodule
