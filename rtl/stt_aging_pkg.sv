// Shared types and constants of the STT-MRAM on-line aging detection and
// tolerance design.
//
// An MTJ loses resistance as time-dependent dielectric breakdown opens
// pinholes in its barrier. The design sorts each word into one of four
// health levels and, for the two levels that can still be read, lowers the
// sense-amplifier reference so that a degraded AP (logic 1) cell still reads
// above it. The four levels and the three reference settings are the ones
// of the framework's health-level definition (nominal, weak, strong, breakdown; R_REF0, 2/3
// and 1/2 of it). Resistances travel between the analog models as integer
// ohms and detection voltages in tenths of a millivolt: that encoding is this
// design's own choice.
package stt_aging_pkg;

  // Health level of an MTJ or of a word (worst of its bits). Ordered so that
  // a larger value means more aging.
  typedef enum logic [1:0] {
    H_NOMINAL   = 2'd0,  // R_AP above R_REF0, no adjustment needed
    H_WEAK      = 2'd1,  // 2/3 R_REF0 < R_AP < R_REF0
    H_STRONG    = 2'd2,  // 1/2 R_REF0 < R_AP < 2/3 R_REF0
    H_BREAKDOWN = 2'd3   // R_AP < 1/2 R_REF0, cannot be compensated
  } health_e;

  // Reference resistance chosen for a read.
  typedef enum logic [1:0] {
    REF_FULL = 2'd0,     // R_REF0
    REF_2_3  = 2'd1,     // 2/3 R_REF0, weak-aged words
    REF_1_2  = 2'd2      // 1/2 R_REF0, strong-aged words
  } ref_sel_e;

  // Level a driver puts on a word line, bit line or source line: the
  // operation conditions of a 1T1MTJ cell. Write '1': BL at GND, SL at VDD;
  // write '0': BL at VDD, SL at GND; read: BL at V_read, SL at GND.
  typedef enum logic [1:0] {
    DRV_GND   = 2'd0,
    DRV_VDD   = 2'd1,
    DRV_VREAD = 2'd2
  } drive_e;

  // Resistances in ohms.
  localparam int unsigned RES_W = 16;
  typedef logic [RES_W-1:0] ohm_t;

  // Nominal read reference. Chosen so that the published corner resistances fall
  // into the intended bands: nominal R_AP >= 4.1k, weak 3.01k..3.91k,
  // strong 2.05k..2.87k, so 2/3 R_REF0 = 2.67k and 1/2 R_REF0 = 2.0k.
  localparam int unsigned R_REF0_OHM = 4000;

  // Reference a word of the given health level is read with. Breakdown words
  // get the lowest reference available; they are reported as uncorrectable.
  function automatic ref_sel_e ref_for_level(health_e h);
    unique case (h)
      H_NOMINAL: return REF_FULL;
      H_WEAK:    return REF_2_3;
      default:   return REF_1_2;
    endcase
  endfunction

  // Health level a LUT row stands for (W/S bit: 0 weak, 1 strong).
  function automatic health_e level_of_ws(logic hit, logic ws);
    if (!hit)    return H_NOMINAL;
    else if (ws) return H_STRONG;
    else         return H_WEAK;
  endfunction

endpackage
