// Self-checking testbench of stt_array (16 words of 8 bits): random writes
// and reads against a copy of the contents. The word, bit and source line
// levels must match the cell's operation conditions; a stored 1 must show the AP
// resistance and a stored 0 the P resistance of its cell, fresh or aged,
// and an idle array must show 0 on its bit lines.
module stt_array_tb;
  import stt_aging_pkg::*;
  localparam int W = 8, N = 16, AW = 4;

  logic          clk = 0, en = 0, we = 0, age_en = 0;
  logic [AW-1:0] addr = '0, age_addr = '0;
  logic [W-1:0]  wdata = '0;
  logic [2:0]    age_bit = '0;
  ohm_t          age_rap = '0, age_rp = '0;
  ohm_t [W-1:0]  bl_res, mtj_rap;
  drive_e        wl;
  drive_e [W-1:0] bl_drv, sl_drv;
  int checks = 0, failures = 0;

  stt_array #(.WORD_W(W), .WORDS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] mem [N];
  int ap [N][W], p [N][W];

  task automatic rd(int a);
    @(negedge clk);
    en = 1; we = 0; addr = AW'(a);
    #1;
    // read conditions: WL=VDD, BL=V_read, SL=GND
    checks++;
    if (wl != DRV_VDD || bl_drv != {W{DRV_VREAD}} || sl_drv != {W{DRV_GND}}) begin
      failures++;
      $display("FAIL read drive levels");
    end
    for (int b = 0; b < W; b++) begin
      checks += 2;
      if (int'(bl_res[b]) != (mem[a][b] ? ap[a][b] : p[a][b]) || int'(mtj_rap[b]) != ap[a][b]) begin
        failures++;
        $display("FAIL word %0d bit %0d: bl %0d rap %0d", a, b, bl_res[b], mtj_rap[b]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < N; a++) begin
      mem[a] = '0;
      for (int b = 0; b < W; b++) begin ap[a][b] = 4500; p[a][b] = 1960; end
    end
    for (int a = 0; a < N; a++) rd(a);
    for (int t = 0; t < 400; t++) begin
      automatic int a = int'($urandom_range(0, N - 1));
      case ($urandom_range(0, 2))
        0: begin
          @(negedge clk);
          en = 1; we = 1; addr = AW'(a); wdata = W'($urandom);
          mem[a] = wdata;
          #1;
          // write conditions: '1' BL=GND SL=VDD, '0' BL=VDD SL=GND, WL=VDD
          checks++;
          if (wl != DRV_VDD) begin failures++; $display("FAIL WL on write"); end
          for (int b = 0; b < W; b++) begin
            checks++;
            if (bl_drv[b] != (wdata[b] ? DRV_GND : DRV_VDD) || sl_drv[b] != (wdata[b] ? DRV_VDD : DRV_GND)) begin
              failures++;
              $display("FAIL write drive bit %0d", b);
            end
          end
        end
        1: begin
          automatic int b = int'($urandom_range(0, W - 1));
          @(negedge clk);
          en = 0; age_en = 1; age_addr = AW'(a); age_bit = 3'(b);
          age_rap = ohm_t'($urandom_range(1500, 4400));
          age_rp  = ohm_t'($urandom_range(1000, 1900));
          ap[a][b] = int'(age_rap); p[a][b] = int'(age_rp);
          @(negedge clk) age_en = 0;
        end
        default: rd(a);
      endcase
    end
    @(negedge clk) en = 0;
    #1;
    checks++;
    if (bl_res != '0 || mtj_rap != '0 || wl != DRV_GND) begin
      failures++;
      $display("FAIL idle bit lines not 0");
    end
    for (int a = 0; a < N; a++) rd(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
