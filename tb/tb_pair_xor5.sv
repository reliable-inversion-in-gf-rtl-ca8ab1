// tb_pair_xor5 -- exhaustive check of the F unit against the pair-sum
// reference of tb_gf_ref_pkg, plus the property that complementing the
// input leaves the output unchanged.
module tb_pair_xor5;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] x;
  logic [9:0] p, p0;
  pair_xor5 dut (.x(x), .p(p));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v); #1; p0 = p;
      checks++;
      if (p !== pairs_of(x)) begin failures++; $display("FAIL x=%b p=%b", x, p); end
      x = ~x; #1;
      checks++;
      if (p !== p0) begin failures++; $display("FAIL complement x=%b", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
