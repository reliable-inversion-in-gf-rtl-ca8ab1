// tb_stage2_inv4 -- exhaustive check of the GF(2^4) inverter over all 16
// even-weight (PRR) inputs: value(e) * value(d) = 1, and 0 -> 0. The vector
// 11111 (the other form of zero) must also give zero.
module tb_stage2_inv4;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] d, e;
  stage2_inv4 dut (.d(d), .e(e));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      d = 5'(v);
      if (^d && d != 5'b11111) continue;
      #1;
      checks++;
      if (rrb_val(e) != g16_inv(rrb_val(d))) begin
        failures++; $display("FAIL d=%b e=%b", d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
