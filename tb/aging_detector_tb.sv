// Self-checking testbench of aging_detector. Single aged cells take the
// corner resistances of the detection-result table and values just outside
// them; the expected level, W and S come from that table (nominal >= 4.1k,
// weak 3.01k..3.91k, strong 2.05k..2.87k) and from the breakdown bound
// R_AP < 1/2 R_REF0 = 2.0k. Random words check that the word takes the
// level of its worst cell.
module aging_detector_tb;
  import stt_aging_pkg::*;
  localparam int W = 8;

  logic                det_en;
  ohm_t [W-1:0]        mtj_rap;
  logic [W-1:0][1:0]   bit_level;
  health_e             level;
  logic                w_flag, s_flag;
  int checks = 0, failures = 0;

  aging_detector #(.WORD_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic health_e exp_level(int r);
    if (r < 2000)      return H_BREAKDOWN;
    else if (r <= 2870) return H_STRONG;
    else if (r <= 3910) return H_WEAK;
    else                return H_NOMINAL;
  endfunction

  task automatic check_word();
    health_e worst = H_NOMINAL;
    #1;
    for (int b = 0; b < W; b++) begin
      health_e e = det_en ? exp_level(int'(mtj_rap[b])) : H_NOMINAL;
      if (e > worst) worst = e;
      checks++;
      if (bit_level[b] != e) begin
        failures++;
        $display("FAIL bit %0d R=%0d level %0d expected %0d", b, mtj_rap[b], bit_level[b], e);
      end
    end
    checks += 3;
    if (level != worst || w_flag != (worst != H_NOMINAL) || s_flag != (worst >= H_STRONG)) begin
      failures++;
      $display("FAIL word level %0d W%0b S%0b expected %0d", level, w_flag, s_flag, worst);
    end
  endtask

  int corner [] = '{4500, 4100, 3910, 3500, 3010, 2870, 2500, 2050, 2000, 1990, 1500};

  initial begin
    det_en = 1;
    foreach (corner[i]) begin
      for (int b = 0; b < W; b++) mtj_rap[b] = 16'd4500;
      mtj_rap[i % W] = ohm_t'(corner[i]);
      check_word();
    end
    for (int t = 0; t < 400; t++) begin
      det_en = (t % 8) != 7;
      for (int b = 0; b < W; b++) begin
        // keep clear of the narrow gaps between the published bands
        case ($urandom_range(0, 3))
          0: mtj_rap[b] = ohm_t'($urandom_range(4100, 5000));
          1: mtj_rap[b] = ohm_t'($urandom_range(3010, 3910));
          2: mtj_rap[b] = ohm_t'($urandom_range(2050, 2870));
          default: mtj_rap[b] = ohm_t'($urandom_range(1000, 1990));
        endcase
        if ($urandom_range(0, 3) != 0) mtj_rap[b] = 16'd4500;
      end
      check_word();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
