// Behavioural model (not synthesizable logic) of the current-mirror sense
// amplifiers and the modified reference generator.
//
// One sense amplifier per bit compares the current through the selected MTJ
// with the current through a reference resistance: a cell above the
// reference (AP) reads 1, below it (P) reads 0. The modified reference
// generator offers three references, R_REF0, 2/3 R_REF0 and 1/2 R_REF0, so
// that an AP cell whose resistance has dropped with aging still reads 1. The
// three fractions follow the framework's health-level definition; the model reduces the
// amplifier to the resistance comparison, and the value of R_REF0 (4 kOhm)
// is this design's choice, made to fit the published corner resistances.
//
// Interface: combinational. With sa_en high, dout[b] = (bl_res[b] > R_REF),
// R_REF chosen by ref_sel; with sa_en low dout is 0. r_ref reports the
// reference in ohms.
module sa_refgen
  import stt_aging_pkg::*;
#(
  parameter int unsigned WORD_W = 32,
  parameter int unsigned R_REF0 = R_REF0_OHM
) (
  input  logic              sa_en,
  input  ref_sel_e          ref_sel,
  input  ohm_t [WORD_W-1:0] bl_res,
  output ohm_t              r_ref,
  output logic [WORD_W-1:0] dout
);

  always_comb begin
    unique case (ref_sel)
      REF_2_3: r_ref = ohm_t'((2 * R_REF0) / 3);
      REF_1_2: r_ref = ohm_t'(R_REF0 / 2);
      default: r_ref = ohm_t'(R_REF0);
    endcase
  end

  always_comb begin
    for (int b = 0; b < int'(WORD_W); b++)
      dout[b] = sa_en && (bl_res[b] > r_ref);
  end

endmodule
