// STT-MRAM with on-line aging detection and tolerance.
//
// A 32K-bit STT-MRAM (1024 words of 32 bits by default) whose MTJs age by
// time-dependent dielectric breakdown: pinholes in the tunnel barrier lower
// the AP resistance, until an AP cell (logic 1) no longer reads above the
// sense reference. On every read an aging detection circuit grades the
// word as nominal, weak, strong or breakdown. Weak and strong words are
// recorded in a small look-up table (LUT); later reads of them use a
// reference lowered to 2/3 or 1/2 of the nominal one, so that their AP
// cells still read as 1. The LUT covers COV_PCT percent of the words.
//
// Parts: aging_ctrl sequences each access; aging_lut holds the aged words;
// stt_array, sa_refgen and aging_detector are behavioural models of the
// analog cell array, the sense amplifiers with their modified reference
// generator, and the detection circuit. The composition follows the
// original framework's architecture; the host interface is this design's own.
//
// Interface: one request at a time with valid/ready (req_*); a one-cycle
// response pulse (rsp_*) 2 cycles after a write or plain read is accepted,
// 3 cycles when a read discovers new aging and senses the word again.
module stt_aging_top
  import stt_aging_pkg::*;
#(
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned TOTAL_BITS = 32768,
  parameter int unsigned COV_PCT    = 20,
  localparam int unsigned WORDS     = TOTAL_BITS / WORD_W,
  localparam int unsigned ADDR_W    = $clog2(WORDS),
  localparam int unsigned LUT_DEPTH = (WORDS * COV_PCT + 99) / 100,
  localparam int unsigned CNT_W     = $clog2(LUT_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [WORD_W-1:0] req_wdata,
  output logic              rsp_valid,
  output logic              rsp_we,
  output logic [WORD_W-1:0] rsp_rdata,
  output health_e           rsp_level,
  output ref_sel_e          rsp_ref,
  output logic              rsp_lut_hit,
  output logic              rsp_reread,
  output logic              rsp_lut_drop,
  output logic              rsp_uncorrectable,
  output logic [CNT_W-1:0]  lut_count,
  output logic              lut_full,
  // wear-out of one MTJ in the array model (see stt_array)
  input  logic              age_en,
  input  logic [ADDR_W-1:0] age_addr,
  input  logic [$clog2(WORD_W)-1:0] age_bit,
  input  ohm_t              age_rap,
  input  ohm_t              age_rp
);

  logic [ADDR_W-1:0] lk_addr, upd_addr, arr_addr;
  logic              lk_hit, lk_ws, upd_en, upd_ws, upd_drop;
  logic              arr_en, arr_we, sa_en, det_en;
  logic [WORD_W-1:0] arr_wdata, sa_dout;
  ref_sel_e          ref_sel;
  health_e           det_level;
  ohm_t [WORD_W-1:0] bl_res, mtj_rap;
  ohm_t              r_ref;
  logic [WORD_W-1:0][1:0] bit_level;
  logic              det_w, det_s;
  drive_e            wl;
  drive_e [WORD_W-1:0] bl_drv, sl_drv;

  aging_ctrl #(.WORD_W(WORD_W), .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .rsp_valid, .rsp_we, .rsp_rdata, .rsp_level, .rsp_ref, .rsp_lut_hit,
    .rsp_reread, .rsp_lut_drop, .rsp_uncorrectable,
    .lk_addr, .lk_hit, .lk_ws, .upd_en, .upd_addr, .upd_ws, .upd_drop,
    .arr_en, .arr_we, .arr_addr, .arr_wdata, .sa_en, .ref_sel, .det_en,
    .sa_dout, .det_level
  );

  aging_lut #(.ADDR_W(ADDR_W), .DEPTH(LUT_DEPTH)) u_lut (
    .clk, .rst_n,
    .lk_addr, .lk_hit, .lk_ws,
    .upd_en, .upd_addr, .upd_ws, .upd_drop,
    .count(lut_count), .full(lut_full)
  );

  stt_array #(.WORD_W(WORD_W), .WORDS(WORDS)) u_array (
    .clk, .en(arr_en), .we(arr_we), .addr(arr_addr), .wdata(arr_wdata),
    .age_en, .age_addr, .age_bit, .age_rap, .age_rp,
    .bl_res, .mtj_rap, .wl, .bl_drv, .sl_drv
  );

  sa_refgen #(.WORD_W(WORD_W)) u_sa (
    .sa_en, .ref_sel, .bl_res, .r_ref, .dout(sa_dout)
  );

  aging_detector #(.WORD_W(WORD_W)) u_det (
    .det_en, .mtj_rap, .bit_level, .level(det_level), .w_flag(det_w), .s_flag(det_s)
  );

endmodule
