// Helper of stt_aging_cov_tb: runs one array configuration (word width and
// LUT coverage) of stt_aging_top. It ages one AP cell in each of the first
// EXP_ROWS+8 words (alternately weak and strong) and reads each word once:
// the first EXP_ROWS words must each take a LUT row, the rest must be
// dropped, and every read must still return the stored data. A second pass
// must hit the LUT for the recorded words, without a second sensing, and
// must detect the dropped words again. EXP_ROWS is worked out by hand from
// the coverage (ceil(COV_PCT/100 * 32768/WORD_W)).
module cov_run
  import stt_aging_pkg::*;
#(
  parameter int WORD_W   = 32,
  parameter int COV_PCT  = 20,
  parameter int EXP_ROWS = 205
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N  = 32768 / WORD_W;
  localparam int AW = $clog2(N);
  localparam int CW = $clog2(EXP_ROWS + 1);
  localparam int K  = EXP_ROWS + 8;

  logic              rst_n = 0;
  logic              req_valid = 0, req_we = 0;
  logic [AW-1:0]     req_addr = '0;
  logic [WORD_W-1:0] req_wdata = '0;
  logic              req_ready, rsp_valid, rsp_we, rsp_lut_hit, rsp_reread, rsp_lut_drop, rsp_uncorrectable;
  logic [WORD_W-1:0] rsp_rdata;
  health_e           rsp_level;
  ref_sel_e          rsp_ref;
  logic [CW-1:0]     lut_count;
  logic              lut_full;
  logic              age_en = 0;
  logic [AW-1:0]     age_addr = '0;
  logic [$clog2(WORD_W)-1:0] age_bit = '0;
  ohm_t              age_rap = '0, age_rp = '0;

  stt_aging_top #(.WORD_W(WORD_W), .TOTAL_BITS(32768), .COV_PCT(COV_PCT)) dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=%0d cov=%0d %s: got %0h expected %0h", WORD_W, COV_PCT, what, got, exp);
    end
  endtask

  function automatic logic [WORD_W-1:0] pattern(int a);
    return {(WORD_W / 16){16'hA5C3 ^ 16'(a)}} | WORD_W'(1);
  endfunction

  task automatic access(logic we, int a, logic [WORD_W-1:0] d);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = AW'(a); req_wdata = d;
    @(negedge clk);
    req_valid = 0;
    while (!rsp_valid) @(negedge clk);
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < K; a++) access(1, a, pattern(a));
    // first pass: age bit 0 (a stored 1) and read
    for (int a = 0; a < K; a++) begin
      @(negedge clk);
      age_en = 1; age_addr = AW'(a); age_bit = '0;
      age_rap = (a % 2 == 0) ? 16'd3500 : 16'd2500;
      age_rp  = (a % 2 == 0) ? 16'd1700 : 16'd1400;
      @(negedge clk) age_en = 0;
      access(0, a, '0);
      chk("data", rsp_rdata, pattern(a));
      chk("level", rsp_level, (a % 2 == 0) ? H_WEAK : H_STRONG);
      chk("second sensing", rsp_reread, 1);
      chk("drop", rsp_lut_drop, a >= EXP_ROWS);
      chk("count", lut_count, (a + 1 < EXP_ROWS) ? a + 1 : EXP_ROWS);
      chk("full", lut_full, a + 1 >= EXP_ROWS);
    end
    // second pass
    for (int a = 0; a < K; a++) begin
      access(0, a, '0);
      chk("data 2", rsp_rdata, pattern(a));
      chk("hit 2", rsp_lut_hit, a < EXP_ROWS);
      chk("second sensing 2", rsp_reread, a >= EXP_ROWS);
      chk("ref 2", rsp_ref, (a % 2 == 0) ? REF_2_3 : REF_1_2);
    end
    done = 1;
  end
endmodule
