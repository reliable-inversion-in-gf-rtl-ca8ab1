// tb_stage3_mul_rrb -- exhaustive check of the RRB multiplier: for all
// 32 x 32 operand vectors, value(u) = value(s) * value(t) in GF(2^4).
module tb_stage3_mul_rrb;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [9:0] sp, tp;
  logic [4:0] u;
  stage3_mul_rrb dut (.sp(sp), .tp(tp), .u(u));
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int s = 0; s < 32; s++)
      for (int t = 0; t < 32; t++) begin
        sp = pairs_of(5'(s)); tp = pairs_of(5'(t)); #1;
        checks++;
        if (rrb_val(u) != g16_mul(rrb_val(5'(s)), rrb_val(5'(t)))) begin
          failures++;
          if (failures < 10) $display("FAIL s=%b t=%b u=%b", 5'(s), 5'(t), u);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
