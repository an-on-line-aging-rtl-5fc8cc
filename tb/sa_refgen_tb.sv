// Self-checking testbench of sa_refgen: random cell resistances around the
// three references, each sensed with every reference setting; the expected
// bit is worked out from R_REF0 = 4000 ohm and the fractions 2/3 and 1/2.
module sa_refgen_tb;
  import stt_aging_pkg::*;
  localparam int W = 8;

  logic          sa_en;
  ref_sel_e      ref_sel;
  ohm_t [W-1:0]  bl_res;
  ohm_t          r_ref;
  logic [W-1:0]  dout;
  int checks = 0, failures = 0;

  sa_refgen #(.WORD_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_ref(ref_sel_e s);
    case (s)
      REF_2_3: return 2666;
      REF_1_2: return 2000;
      default: return 4000;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int b = 0; b < W; b++) bl_res[b] = ohm_t'($urandom_range(1000, 5000));
      if (t < 3) for (int b = 0; b < W; b++) bl_res[b] = ohm_t'(exp_ref(ref_sel_e'(t)) + b - 3);
      for (int s = 0; s < 3; s++) begin
        ref_sel = ref_sel_e'(s);
        sa_en   = (t % 10) != 9;
        #1;
        checks++;
        if (int'(r_ref) != exp_ref(ref_sel)) begin
          failures++;
          $display("FAIL r_ref %0d for sel %0d", r_ref, s);
        end
        for (int b = 0; b < W; b++) begin
          checks++;
          if (dout[b] != (sa_en && int'(bl_res[b]) > exp_ref(ref_sel))) begin
            failures++;
            $display("FAIL bit %0d R=%0d sel=%0d got %0b", b, bl_res[b], s, dout[b]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
