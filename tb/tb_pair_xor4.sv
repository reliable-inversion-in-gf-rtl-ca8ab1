// tb_pair_xor4 -- exhaustive check of the H/L unit: each output bit must be
// the XOR of the two input bits named by its position (12,13,14,23,24,34).
module tb_pair_xor4;
  int checks = 0, failures = 0;
  logic [3:0] x;
  logic [5:0] p;
  pair_xor4 dut (.x(x), .p(p));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int k;
    for (int v = 0; v < 16; v++) begin
      x = 4'(v); #1;
      k = 0;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++) begin
          checks++;
          if (p[k] !== (x[i] ^ x[j])) begin
            failures++; $display("FAIL x=%b pair %0d%0d", x, i + 1, j + 1);
          end
          k++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
