// Self-checking testbench of aging_ctrl (16 words of 8 bits). The
// testbench stands in for everything around the controller: a word memory
// whose aged bits read as 0 when sensed with too high a reference, a
// detection result per word, and a LUT indexed directly by address with room
// for 3 words. For each request it works out on its own which reference the
// final sensing must use, whether the word is sensed twice, the data, the
// flags, the LUT contents afterwards and the latency (2 cycles, 3 with a
// second sensing).
module aging_ctrl_tb;
  import stt_aging_pkg::*;
  localparam int W = 8, AW = 4, N = 16, LCAP = 3;

  logic          clk = 0, rst_n = 0;
  logic          req_valid = 0, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [W-1:0]  req_wdata = '0;
  logic          req_ready, rsp_valid, rsp_we, rsp_lut_hit, rsp_reread, rsp_lut_drop, rsp_uncorrectable;
  logic [W-1:0]  rsp_rdata;
  health_e       rsp_level;
  ref_sel_e      rsp_ref;
  logic [AW-1:0] lk_addr, upd_addr, arr_addr;
  logic          lk_hit, lk_ws, upd_en, upd_ws, upd_drop;
  logic          arr_en, arr_we, sa_en, det_en;
  logic [W-1:0]  arr_wdata, sa_dout;
  ref_sel_e      ref_sel;
  health_e       det_level;
  int checks = 0, failures = 0;

  aging_ctrl #(.WORD_W(W), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- environment models ----
  logic [W-1:0] mem [N];
  logic [W-1:0] aged_mask [N];
  health_e      lvl [N];
  logic         lut_v [N], lut_ws [N];
  int           lut_n;

  function automatic int ref_rank(ref_sel_e r);
    return (r == REF_FULL) ? 0 : (r == REF_2_3) ? 1 : 2;
  endfunction
  function automatic int lvl_rank(health_e h);
    return (h == H_NOMINAL) ? 0 : (h == H_WEAK) ? 1 : 2;  // breakdown needs 3
  endfunction
  function automatic logic [W-1:0] sensed(int a, ref_sel_e r);
    int need = (lvl[a] == H_BREAKDOWN) ? 3 : lvl_rank(lvl[a]);
    return (ref_rank(r) >= need) ? mem[a] : (mem[a] & ~aged_mask[a]);
  endfunction

  assign lk_hit    = lut_v[lk_addr];
  assign lk_ws     = lut_ws[lk_addr];
  assign upd_drop  = upd_en && !lut_v[upd_addr] && lut_n == LCAP;
  assign sa_dout   = sa_en ? sensed(int'(arr_addr), ref_sel) : '0;
  assign det_level = det_en ? lvl[arr_addr] : H_NOMINAL;

  always @(posedge clk) begin
    if (arr_en && arr_we) mem[arr_addr] <= arr_wdata;
    if (upd_en) begin
      if (lut_v[upd_addr]) lut_ws[upd_addr] <= lut_ws[upd_addr] | upd_ws;
      else if (lut_n < LCAP) begin
        lut_v[upd_addr] <= 1'b1; lut_ws[upd_addr] <= upd_ws; lut_n <= lut_n + 1;
      end
    end
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  int n_reread = 0, n_hit = 0, n_drop = 0, n_unc = 0;

  task automatic access(logic we, int a, logic [W-1:0] d);
    int n;
    health_e lut_lvl, cap;
    logic worse, exp_drop, was_v;
    ref_sel_e exp_ref;
    logic [W-1:0] exp_data;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    was_v   = lut_v[a];
    lut_lvl = !lut_v[a] ? H_NOMINAL : lut_ws[a] ? H_STRONG : H_WEAK;
    cap     = (lvl[a] == H_BREAKDOWN) ? H_STRONG : lvl[a];
    worse   = !we && (cap > lut_lvl);
    exp_ref = worse ? ref_for_level(cap) : ref_for_level(lut_lvl);
    exp_drop = worse && !lut_v[a] && lut_n == LCAP;
    req_valid = 1; req_we = we; req_addr = AW'(a); req_wdata = d;
    @(negedge clk);
    req_valid = 0;
    // n counts falling edges after the accepting rising edge
    n = 1;
    while (!rsp_valid && n < 10) begin
      chk("ready while busy", int'(req_ready), 0);
      @(negedge clk);
      n++;
    end
    if (we) mem[a] = d;
    chk("rsp_we", int'(rsp_we), int'(we));
    if (we) begin
      chk("write latency", n, 2);
      chk("written", int'(mem[a]), int'(d));
    end else begin
      exp_data = sensed(a, exp_ref);
      chk("read latency", n, worse ? 3 : 2);
      chk("rdata", int'(rsp_rdata), int'(exp_data));
      chk("ref", int'(rsp_ref), int'(exp_ref));
      chk("reread", int'(rsp_reread), int'(worse));
      chk("lut_hit", int'(rsp_lut_hit), int'(was_v));
      chk("level", int'(rsp_level), int'(lvl[a]));
      chk("unc", int'(rsp_uncorrectable), int'(lvl[a] == H_BREAKDOWN));
      chk("drop", int'(rsp_lut_drop), int'(exp_drop));
      chk("lut valid after", int'(lut_v[a]), int'(was_v || (worse && !exp_drop)));
      if (lut_v[a]) chk("lut ws after", int'(lut_ws[a]), int'(cap == H_STRONG || (was_v && lut_lvl == H_STRONG)));
      n_reread += int'(worse); n_hit += int'(was_v); n_drop += int'(exp_drop);
      n_unc += int'(lvl[a] == H_BREAKDOWN);
    end
    @(negedge clk);
    chk("rsp pulse", int'(rsp_valid), 0);
  endtask

  task automatic age(int a, health_e h);
    if (h > lvl[a]) lvl[a] = h;
    aged_mask[a] |= W'(1 << $urandom_range(0, W - 1));
  endtask

  initial begin
    for (int a = 0; a < N; a++) begin
      mem[a] = '0; aged_mask[a] = '0; lvl[a] = H_NOMINAL; lut_v[a] = 0; lut_ws[a] = 0;
    end
    lut_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < N; a++) access(1, a, W'($urandom));
    for (int a = 0; a < N; a++) access(0, a, '0);
    // directed: weak, read again, strong, read again, breakdown
    age(1, H_WEAK);   access(0, 1, '0); access(0, 1, '0);
    age(1, H_STRONG); access(0, 1, '0); access(0, 1, '0);
    age(2, H_STRONG); access(0, 2, '0);
    age(3, H_WEAK);   access(0, 3, '0);
    age(4, H_WEAK);   access(0, 4, '0); access(0, 4, '0);   // LUT full: dropped
    age(5, H_BREAKDOWN); access(0, 5, '0);
    for (int t = 0; t < 300; t++) begin
      automatic int a = int'($urandom_range(0, N - 1));
      case ($urandom_range(0, 5))
        0: access(1, a, W'($urandom));
        1: if ($urandom_range(0, 3) == 0) age(a, health_e'($urandom_range(1, 3)));
        default: access(0, a, '0);
      endcase
    end
    chk("rereads seen", int'(n_reread > 0), 1);
    chk("hits seen", int'(n_hit > 0), 1);
    chk("drops seen", int'(n_drop > 0), 1);
    chk("breakdown seen", int'(n_unc > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
