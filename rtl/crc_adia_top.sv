// Multi-phase adiabatic 16-bit CRC for ISO/IEC 14443 (NFC), phase-level model.
//
// A bit-serial LFSR computes the CRC of a MSG_W-bit message word with any
// generator polynomial g1..g(CRC_W-1) and any preset value.  Every logic gate
// of the adiabatic implementation is modelled as one stage that evaluates in
// its power-clock phase; `clk` is the ramp-time tick Tr and pclk_seq turns it
// into the phase strobes of the chosen power-clocking scheme (SCHEME).  The
// gate-level pipeline is identical for the 4-phase, 2-phase and single-phase
// schemes; only the time per phase differs.
//
// Blocks: controller (crc_counter + crc_decoder), test multiplexer
// (crc_msg_mux), delay cell, CRC datapath (crc_poly_gen + crc_unit) and
// register unit, wired as in the document's block diagram.
//
// Operation: hold RES high for a few power-clock cycles with New message = 1
// and msg, gpoly and init set; release RES.  The CRC then runs continuously:
// one message bit per power-clock cycle, MSB first.  After the last bit the
// counter shows 1111 and r_count drops for one cycle; inputs for the next
// word (message, polynomial, preset) may be changed while r_count is 0.  The
// word and its CRC appear on m_out/crc_out and stay there for 8 phases (two
// power-clock cycles of the 4-phase scheme); wait_n (R4) is 0 in the middle
// of that window.  From the counter
// accepting the start to the CRC in the register unit takes 75 phases
// (18.75 cycles for 4-phase, 37.5 for 2-phase, 75 for single-phase); a new
// word starts every MSG_W + 1 cycles.  With RES low and New message low the
// counter stays at 0 and no result is produced; RES must then be pulsed
// before the next word.  pc_rst only restarts the power-clock sequencer.
//
// The block set, the connections and the 75-phase latency follow the
// document; the stage positions, the exposed r_count / wait_n status, the
// word period of MSG_W + 1 cycles and pc_rst are this design's own choices.
module crc_adia_top
  import crc_adia_pkg::*;
#(
  parameter pc_scheme_e SCHEME = PC_4PHASE,
  parameter int         CRC_W  = NFC_CRC_W,
  parameter int         MSG_W  = NFC_MSG_W
) (
  input  logic             clk,          // one tick per ramp time Tr
  input  logic             pc_rst,       // power-clock sequencer reset
  input  logic             res,          // RES, active high
  input  logic             new_message,  // New message, active high
  input  logic [MSG_W-1:0] msg,          // message word, msg[MSG_W-1] first
  input  logic [CRC_W-1:1] gpoly,        // g(CRC_W-1)..g1
  input  logic [CRC_W-1:0] init,         // preset b(CRC_W-1)..b0
  output logic [MSG_W-1:0] m_out,        // retained message word
  output logic [CRC_W-1:0] crc_out,      // retained CRC
  output logic             r_count,      // 0 for one cycle at count all-ones
  output logic             wait_n,       // R4: 0 while the result is held
  output logic [3:0]       pc_ph,        // phase strobes
  output logic             pc_cycle      // first tick of a power-clock cycle
);

  localparam int CNT_W = $clog2(MSG_W);

  logic [3:0]       ph;
  logic [CNT_W-1:0] q_3, q, q_1;
  logic             r0, r1, r2, r3, r4;
  logic             in_bit, in_d, fb;
  logic [CRC_W-1:1] gp;
  logic [CRC_W-1:0] cr;

  pclk_seq #(.SCHEME(SCHEME)) u_pclk (
    .clk, .rst(pc_rst), .ph, .cyc_start(pc_cycle)
  );

  crc_counter #(.CW(CNT_W)) u_counter (
    .clk, .ph, .r_count, .new_message, .q_3, .q, .q_1
  );

  crc_decoder #(.CW(CNT_W)) u_decoder (
    .clk, .ph, .q, .res, .r_count, .r0, .r1, .r2, .r3, .r4
  );

  crc_msg_mux #(.MW(MSG_W), .CW(CNT_W)) u_mux (
    .clk, .ph, .msg, .q_3, .q, .q_1, .in_bit
  );

  crc_delay_cell #(.DEPTH(4), .IN_POS(2)) u_delay (
    .clk, .ph, .d(in_bit), .q(in_d)
  );

  crc_poly_gen #(.W(CRC_W)) u_poly (
    .clk, .ph, .r0, .g(gpoly), .fb, .gp
  );

  crc_unit #(.W(CRC_W)) u_crc (
    .clk, .ph, .in_bit, .r1, .r2, .r3, .init, .gp, .fb, .cr
  );

  crc_register_unit #(.MW(MSG_W), .CW(CRC_W)) u_reg (
    .clk, .ph, .in_d, .cr, .ret(r4), .m_out, .crc_out
  );

  assign wait_n = r4;
  assign pc_ph  = ph;

endmodule
