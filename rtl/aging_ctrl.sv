// Access controller of the aging-tolerant STT-MRAM.
//
// A read runs through the framework's steps: the address is looked up in
// the LUT of aged words, the sense amplifiers get the reference that the
// recorded health level calls for (R_REF0, 2/3 or 1/2 of it), and the word
// is sensed while the detection circuit classifies it. If the detection
// finds the word more aged than the LUT knew, the LUT is updated (a new row
// or weak -> strong) and the word is sensed a second time with the newly
// adjusted reference, so that the read that discovers the aging already
// returns correct data. A word with a cell in breakdown is read with the
// lowest reference and reported as uncorrectable. Writes go straight to the
// array; detection only runs on reads.
//
// The steps follow the original framework; the cycle timing, the second sensing and
// the response flags are this design's choices.
//
// Timing (one request at a time, valid/ready handshake on the request):
//   read : accept -> SENSE -> [RESENSE] -> RESP
//   write: accept -> WRITE -> RESP
// A request accepted at clock edge k is answered with rsp_valid sampled high
// at edge k+2, or k+3 when the word is sensed twice.
// rsp_valid is a one-cycle pulse; the response cannot be stalled.
module aging_ctrl
  import stt_aging_pkg::*;
#(
  parameter int unsigned WORD_W = 32,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // host request
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [WORD_W-1:0] req_wdata,
  // host response
  output logic              rsp_valid,
  output logic              rsp_we,
  output logic [WORD_W-1:0] rsp_rdata,
  output health_e           rsp_level,          // health found by this read
  output ref_sel_e          rsp_ref,            // reference of the final sensing
  output logic              rsp_lut_hit,        // word was already in the LUT
  output logic              rsp_reread,         // word was sensed twice
  output logic              rsp_lut_drop,       // aged word found no free LUT row
  output logic              rsp_uncorrectable,  // a cell is in breakdown
  // LUT
  output logic [ADDR_W-1:0] lk_addr,
  input  logic              lk_hit,
  input  logic              lk_ws,
  output logic              upd_en,
  output logic [ADDR_W-1:0] upd_addr,
  output logic              upd_ws,
  input  logic              upd_drop,
  // array, sense amplifiers and detection circuit
  output logic              arr_en,
  output logic              arr_we,
  output logic [ADDR_W-1:0] arr_addr,
  output logic [WORD_W-1:0] arr_wdata,
  output logic              sa_en,
  output ref_sel_e          ref_sel,
  output logic              det_en,
  input  logic [WORD_W-1:0] sa_dout,
  input  health_e           det_level
);

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_SENSE, S_RESENSE, S_RESP} state_e;

  state_e            state;
  logic              we_q;
  logic [ADDR_W-1:0] addr_q;
  logic [WORD_W-1:0] wdata_q;
  health_e           lut_lvl_q;   // level the LUT holds for the word
  ref_sel_e          ref_q;       // reference of the current sensing
  logic              hit_q;

  // Level the detection asks for, limited to what a reference can serve.
  health_e det_lvl_cap;
  logic    det_worse;
  assign det_lvl_cap = (det_level == H_BREAKDOWN) ? H_STRONG : det_level;
  assign det_worse   = (det_lvl_cap > lut_lvl_q);

  assign req_ready = (state == S_IDLE);
  assign lk_addr   = (state == S_IDLE) ? req_addr : addr_q;

  assign arr_en    = (state == S_WRITE) || (state == S_SENSE) || (state == S_RESENSE);
  assign arr_we    = (state == S_WRITE);
  assign arr_addr  = addr_q;
  assign arr_wdata = wdata_q;
  assign sa_en     = (state == S_SENSE) || (state == S_RESENSE);
  assign det_en    = (state == S_SENSE);
  assign ref_sel   = ref_q;

  assign upd_en    = (state == S_SENSE) && det_worse;
  assign upd_addr  = addr_q;
  assign upd_ws    = (det_lvl_cap == H_STRONG);

  assign rsp_valid = (state == S_RESP);
  assign rsp_we    = we_q;
  assign rsp_ref   = ref_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state             <= S_IDLE;
      we_q              <= 1'b0;
      addr_q            <= '0;
      wdata_q           <= '0;
      lut_lvl_q         <= H_NOMINAL;
      ref_q             <= REF_FULL;
      hit_q             <= 1'b0;
      rsp_rdata         <= '0;
      rsp_level         <= H_NOMINAL;
      rsp_lut_hit       <= 1'b0;
      rsp_reread        <= 1'b0;
      rsp_lut_drop      <= 1'b0;
      rsp_uncorrectable <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            we_q      <= req_we;
            addr_q    <= req_addr;
            wdata_q   <= req_wdata;
            hit_q     <= lk_hit;
            lut_lvl_q <= level_of_ws(lk_hit, lk_ws);
            ref_q     <= ref_for_level(level_of_ws(lk_hit, lk_ws));
            rsp_rdata         <= '0;
            rsp_level         <= H_NOMINAL;
            rsp_lut_hit       <= 1'b0;
            rsp_reread        <= 1'b0;
            rsp_lut_drop      <= 1'b0;
            rsp_uncorrectable <= 1'b0;
            state     <= req_we ? S_WRITE : S_SENSE;
          end
        end
        S_WRITE: state <= S_RESP;
        S_SENSE: begin
          rsp_rdata         <= sa_dout;
          rsp_level         <= det_level;
          rsp_lut_hit       <= hit_q;
          rsp_uncorrectable <= (det_level == H_BREAKDOWN);
          rsp_lut_drop      <= upd_en && upd_drop;
          if (det_worse) begin
            ref_q      <= ref_for_level(det_lvl_cap);
            rsp_reread <= 1'b1;
            state      <= S_RESENSE;
          end else begin
            state <= S_RESP;
          end
        end
        S_RESENSE: begin
          rsp_rdata <= sa_dout;
          state     <= S_RESP;
        end
        S_RESP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: a response is a one-cycle pulse, nothing is accepted
  // while a request is in flight, and only reads update the LUT.
  a_rsp_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                rsp_valid |=> !rsp_valid);
  a_one_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
                                    (req_valid && req_ready) |=> !req_ready);
  a_upd_on_read: assert property (@(posedge clk) disable iff (!rst_n)
                                  upd_en |-> !we_q);

endmodule
