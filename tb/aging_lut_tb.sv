// Self-checking testbench of aging_lut with 4 rows: directed cases (insert,
// weak -> strong upgrade, no downgrade, full table, drop, reset) and then
// random updates compared with a reference table kept in the testbench.
module aging_lut_tb;
  localparam int ADDR_W = 10;
  localparam int DEPTH  = 4;
  localparam int CNT_W  = $clog2(DEPTH + 1);

  logic              clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] lk_addr = '0, upd_addr = '0;
  logic              lk_hit, lk_ws, upd_en = 0, upd_ws = 0, upd_drop, full;
  logic [CNT_W-1:0]  count;
  int checks = 0, failures = 0;

  aging_lut #(.ADDR_W(ADDR_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: address -> ws
  logic ref_ws [int];

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic look(int a);
    lk_addr = ADDR_W'(a);
    #1;
    check($sformatf("hit %0d", a), lk_hit, ref_ws.exists(a));
    if (ref_ws.exists(a)) check($sformatf("ws %0d", a), lk_ws, ref_ws[a]);
  endtask

  task automatic update(int a, logic ws);
    logic exp_drop;
    @(negedge clk);
    upd_en = 1; upd_addr = ADDR_W'(a); upd_ws = ws;
    #1;
    exp_drop = !ref_ws.exists(a) && ref_ws.num() == DEPTH;
    check($sformatf("drop %0d", a), upd_drop, exp_drop);
    if (ref_ws.exists(a)) ref_ws[a] = ref_ws[a] | ws;
    else if (!exp_drop) ref_ws[a] = ws;
    @(negedge clk);
    upd_en = 0;
    checks++;
    if (int'(count) != ref_ws.num()) begin
      failures++;
      $display("FAIL count %0d expected %0d", count, ref_ws.num());
    end
    check("full", full, ref_ws.num() == DEPTH);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    look(5);
    check("empty count", count == 0, 1'b1);
    update(5, 0);  look(5);          // new weak word
    update(5, 1);  look(5);          // weak -> strong
    update(5, 0);  look(5);          // never back to weak
    update(9, 1);  look(9);
    update(700, 0); update(1023, 0);
    look(700); look(1023); look(6);
    update(33, 1); look(33);         // table full: dropped
    update(700, 1); look(700);       // upgrade still works when full
    // reset clears everything
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    ref_ws.delete();
    look(5); look(9);
    check("count after reset", count == 0, 1'b1);
    // random
    for (int r = 0; r < 6; r++) begin
      @(negedge clk) rst_n = 0;
      @(negedge clk) rst_n = 1;
      ref_ws.delete();
      for (int i = 0; i < 40; i++) begin
        update(int'($urandom_range(0, 11)), 1'($urandom_range(0, 1)));
        look(int'($urandom_range(0, 11)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
