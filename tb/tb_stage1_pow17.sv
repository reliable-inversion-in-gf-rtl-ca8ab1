// tb_stage1_pow17 -- exhaustive check of Stage 1 over all 256 (h,l): the
// output must have even weight and its field value must be the norm
// a^17 = a * a^16 of a = h alpha^16 + l alpha, computed in the reference
// tower field (a^16 = l alpha^16 + h alpha), which must lie in GF(2^4).
module tb_stage1_pow17;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] h, l;
  logic [5:0] hp, lp;
  logic [4:0] d;
  stage1_pow17 dut (.h(h), .l(l), .hp(hp), .lp(lp), .d(d));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    tw_t a, a16, n;
    logic [9:0] ph, pl;
    for (int v = 0; v < 256; v++) begin
      h = 4'(v >> 4); l = 4'(v);
      ph = pairs_of({h, 1'b0}); pl = pairs_of({l, 1'b0});
      hp = ph[9:4]; lp = pl[9:4];
      #1;
      a   = tw_from_hl(nb_val(h), nb_val(l));
      a16 = tw_from_hl(nb_val(l), nb_val(h));
      n   = tw_mul(a, a16);
      checks++;
      if (n.c1 != 0 || rrb_val(d) != n.c0) begin
        failures++; $display("FAIL h=%b l=%b d=%b", h, l, d);
      end
      checks++;
      if (^d) begin failures++; $display("FAIL odd parity d=%b", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
