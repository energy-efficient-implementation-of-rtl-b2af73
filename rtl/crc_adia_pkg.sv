// Shared definitions for the phase-level model of the multi-phase adiabatic
// 16-bit CRC (ISO/IEC 14443-3 NFC frame check).
//
// Timing model used by every module of the design: each adiabatic logic gate
// is one pipeline stage that evaluates in one power-clock phase ("slot").
// Four stage positions, 0..3, are used throughout; a stage in position p
// reads only stages in position p-1 (mod 4).  The power-clock sequencer
// (pclk_seq) turns the ramp-time tick into a one-hot strobe ph[3:0] for the
// four positions.  In the 4-phase scheme each position is its own power-clock
// (Phi1..Phi4); in the 2-phase scheme positions 0/2 share Phi1 and 1/3 share
// Phi2; in the single-phase scheme they share the auxiliary clocks Cx and Cxb.
// The polynomial and preset values are those of the NFC standard; the slot
// mapping and the tick lengths per slot are this model's own reading of the
// power-clock waveforms.
package crc_adia_pkg;

  // Power-clocking scheme.
  typedef enum logic [1:0] {
    PC_4PHASE = 2'd0,   // IECRL, PFAL, EACRL: T_clk = 4 Tr, four phases
    PC_2PHASE = 2'd1,   // CPAL: T_clk = 6 Tr, two non-overlapping phases
    PC_1PHASE = 2'd2    // CAL: T_clk = 4 Tr, one power-clock plus Cx/Cxb
  } pc_scheme_e;

  // Default sizes: 16-bit CRC over a 16-bit message word.
  localparam int NFC_CRC_W = 16;
  localparam int NFC_MSG_W = 16;

  // G(x) = x^16 + x^12 + x^5 + 1.  The document writes it as 0x8810, i.e.
  // {g16, g15, ..., g1}; the datapath takes g15..g1 (g0 = g16 = 1 implied).
  localparam logic [15:0] NFC_G_HEX = 16'h8810;
  localparam logic [NFC_CRC_W-1:1] NFC_GPOLY = NFC_G_HEX[14:0];

  // Preset (initial load) values for the three ISO/IEC 14443 bit rates.
  localparam logic [NFC_CRC_W-1:0] PRESET_106K = 16'h6363;
  localparam logic [NFC_CRC_W-1:0] PRESET_212K_424K = 16'h0000;

  // Number of distinct evaluation slots per power-clock pattern.
  function automatic int slots_of(pc_scheme_e s);
    return (s == PC_4PHASE) ? 4 : 2;
  endfunction

  // Ramp-time ticks (Tr) in one slot.
  function automatic int ticks_per_slot(pc_scheme_e s);
    case (s)
      PC_4PHASE: return 1;
      PC_2PHASE: return 3;
      default:   return 4;
    endcase
  endfunction

  // Ramp-time ticks (Tr) in one power-clock cycle: 4 Tr or 6 Tr (Fig. 2).
  function automatic int ticks_per_cycle(pc_scheme_e s);
    return (s == PC_2PHASE) ? 6 : 4;
  endfunction

endpackage
