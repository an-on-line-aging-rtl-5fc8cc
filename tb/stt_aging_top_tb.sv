// End-to-end testbench of stt_aging_top at its default size: 32K bits as
// 1024 words of 32 bits, and a LUT for 20% of the words (205 rows).
//
// The testbench fills the memory, then ages cells through the wear-out port
// with resistances taken from inside the published health bands (weak:
// R_AP 3.5k / R_P 1.7k, strong: 2.5k / 1.4k, breakdown: 1.8k / 1.1k) and
// reads the words back. It keeps its own copy of every cell's resistances
// and works out the sensed data from them and from the reference the read
// must end with (4000, 2666 or 2000 ohm), together with the expected LUT
// behaviour. It counts each mechanism: a first detection with a second
// sensing, weak and strong LUT hits, a weak -> strong upgrade, breakdown,
// a full LUT and a dropped word; one that never happens is a failure.
module stt_aging_top_tb;
  import stt_aging_pkg::*;
  localparam int W = 32, N = 1024, AW = 10, LUT_ROWS = 205;

  logic          clk = 0, rst_n = 0;
  logic          req_valid = 0, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [W-1:0]  req_wdata = '0;
  logic          req_ready, rsp_valid, rsp_we, rsp_lut_hit, rsp_reread, rsp_lut_drop, rsp_uncorrectable;
  logic [W-1:0]  rsp_rdata;
  health_e       rsp_level;
  ref_sel_e      rsp_ref;
  logic [7:0]    lut_count;
  logic          lut_full;
  logic          age_en = 0;
  logic [AW-1:0] age_addr = '0;
  logic [4:0]    age_bit = '0;
  ohm_t          age_rap = '0, age_rp = '0;
  int checks = 0, failures = 0;

  stt_aging_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference state ----
  logic [W-1:0] mem [N];
  int           rap [N][W], rp [N][W];
  health_e      lvl [N];
  logic         lut_v [N], lut_ws [N];
  int           lut_n;

  // counters of the mechanisms
  int n_write, n_plain, n_reread, n_hit_weak, n_hit_strong, n_upgrade, n_unc, n_drop, n_full, n_tolerated;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic int ref_ohm(ref_sel_e r);
    return (r == REF_FULL) ? 4000 : (r == REF_2_3) ? 2666 : 2000;
  endfunction

  function automatic logic [W-1:0] sensed(int a, ref_sel_e r);
    logic [W-1:0] d;
    for (int b = 0; b < W; b++) d[b] = (mem[a][b] ? rap[a][b] : rp[a][b]) > ref_ohm(r);
    return d;
  endfunction

  task automatic age_bit_to(int a, int b, health_e h);
    int ra, rq;
    case (h)
      H_WEAK:   begin ra = 3500; rq = 1700; end
      H_STRONG: begin ra = 2500; rq = 1400; end
      default:  begin ra = 1800; rq = 1100; end
    endcase
    if (rap[a][b] <= ra) return;   // a cell never recovers
    @(negedge clk);
    age_en = 1; age_addr = AW'(a); age_bit = 5'(b); age_rap = ohm_t'(ra); age_rp = ohm_t'(rq);
    rap[a][b] = ra; rp[a][b] = rq;
    if (h > lvl[a]) lvl[a] = h;
    @(negedge clk) age_en = 0;
  endtask

  task automatic access(logic we, int a, logic [W-1:0] d);
    int n;
    health_e lut_lvl, cap;
    logic worse, exp_drop, was_v;
    ref_sel_e exp_ref;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    was_v    = lut_v[a];
    lut_lvl  = !was_v ? H_NOMINAL : lut_ws[a] ? H_STRONG : H_WEAK;
    cap      = (lvl[a] == H_BREAKDOWN) ? H_STRONG : lvl[a];
    worse    = !we && (cap > lut_lvl);
    exp_ref  = worse ? ref_for_level(cap) : ref_for_level(lut_lvl);
    exp_drop = worse && !was_v && lut_n == LUT_ROWS;
    req_valid = 1; req_we = we; req_addr = AW'(a); req_wdata = d;
    @(negedge clk);
    req_valid = 0;
    n = 1;
    while (!rsp_valid && n < 10) begin
      @(negedge clk);
      n++;
    end
    if (we) begin
      mem[a] = d;
      chk("write latency", n, 2);
      n_write++;
    end else begin
      chk("read latency", n, worse ? 3 : 2);
      chk("rdata", rsp_rdata, sensed(a, exp_ref));
      chk("ref", rsp_ref, exp_ref);
      chk("reread", rsp_reread, worse);
      chk("lut_hit", rsp_lut_hit, was_v);
      chk("level", rsp_level, lvl[a]);
      chk("uncorrectable", rsp_uncorrectable, lvl[a] == H_BREAKDOWN);
      chk("drop", rsp_lut_drop, exp_drop);
      // correct data despite aging: every cell not in breakdown reads right
      if (lvl[a] != H_NOMINAL && lvl[a] != H_BREAKDOWN) begin
        chk("aged word read correctly", rsp_rdata, mem[a]);
        if (sensed(a, REF_FULL) != mem[a]) n_tolerated++;
      end
      if (worse && !exp_drop) begin
        if (!was_v) lut_n++;
        else n_upgrade++;
        lut_v[a] = 1;
        lut_ws[a] = (cap == H_STRONG);
      end
      n_plain      += int'(!worse);
      n_reread     += int'(worse);
      n_hit_weak   += int'(was_v && !lut_ws[a] && !worse);
      n_hit_strong += int'(was_v && lut_lvl == H_STRONG);
      n_unc        += int'(lvl[a] == H_BREAKDOWN);
      n_drop       += int'(exp_drop);
    end
    chk("lut_count", lut_count, lut_n);
    chk("lut_full", lut_full, lut_n == LUT_ROWS);
    n_full += int'(lut_full);
  endtask

  // a word storing alternating ones so that aged AP cells matter
  task automatic age_word(int a, health_e h, int nbits);
    for (int i = 0; i < nbits; i++) age_bit_to(a, (i * 7 + a) % W, h);
  endtask

  initial begin
    for (int a = 0; a < N; a++) begin
      mem[a] = '0; lvl[a] = H_NOMINAL; lut_v[a] = 0; lut_ws[a] = 0;
      for (int b = 0; b < W; b++) begin rap[a][b] = 4500; rp[a][b] = 1960; end
    end
    lut_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int a = 0; a < N; a++) access(1, a, $urandom | 32'h0101_0101 | (32'h1 << (a % W)));
    for (int a = 0; a < N; a += 3) access(0, a, '0);

    // one word through weak, strong, breakdown
    age_word(10, H_WEAK, 3);      access(0, 10, '0); access(0, 10, '0);
    age_word(10, H_STRONG, 2);    access(0, 10, '0); access(0, 10, '0);
    access(1, 10, 32'hFFFF_FFFF); access(0, 10, '0);
    age_word(11, H_STRONG, 4);    access(0, 11, '0); access(0, 11, '0);
    age_word(12, H_BREAKDOWN, 1); access(1, 12, 32'hFFFF_FFFF); access(0, 12, '0); access(0, 12, '0);

    // age more words than the LUT holds
    for (int i = 0; i < 230; i++) begin
      automatic int a = 100 + 3 * i;
      age_word(a, ($urandom_range(0, 3) == 0) ? H_STRONG : H_WEAK, 2);
      access(0, a, '0);
    end

    // random traffic over the whole memory, with further aging
    for (int t = 0; t < 3000; t++) begin
      automatic int a = int'($urandom_range(0, N - 1));
      case ($urandom_range(0, 9))
        0, 1: access(1, a, $urandom);
        2:    if ($urandom_range(0, 4) == 0) age_word(a, health_e'($urandom_range(1, 3)), 1);
        default: access(0, a, '0);
      endcase
    end

    $display("writes %0d, plain reads %0d, detections with second sensing %0d", n_write, n_plain, n_reread);
    $display("LUT hits weak %0d strong %0d, upgrades %0d, drops %0d, full-LUT accesses %0d",
             n_hit_weak, n_hit_strong, n_upgrade, n_drop, n_full);
    $display("breakdown reads %0d, aged reads a nominal reference would have got wrong %0d",
             n_unc, n_tolerated);
    chk("writes seen",        n_write > 0, 1);
    chk("plain reads seen",   n_plain > 0, 1);
    chk("second sensing seen", n_reread > 0, 1);
    chk("weak hits seen",     n_hit_weak > 0, 1);
    chk("strong hits seen",   n_hit_strong > 0, 1);
    chk("upgrades seen",      n_upgrade > 0, 1);
    chk("breakdown seen",     n_unc > 0, 1);
    chk("drops seen",         n_drop > 0, 1);
    chk("full LUT seen",      n_full > 0, 1);
    chk("tolerance used",     n_tolerated > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
