// tb_sig_pred_mul -- for all 32 x 32 operands, the predicted parity and
// interleaved parities must equal those of the product formed in the
// testbench as a cyclic convolution modulo x^5-1 (any representative of
// the product has the same pair sums; the convolution plus the all-one
// vector times sum s_i t_i is the form the multiplier produces).
module tb_sig_pred_mul;
  int checks = 0, failures = 0;
  logic [4:0] s, t;
  logic p, p1, p2;
  sig_pred_mul dut (.s(s), .t(t), .p(p), .p1(p1), .p2(p2));
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [4:0] u;
    logic diag;
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        s = 5'(a); t = 5'(b); #1;
        u = '0; diag = 0;
        for (int i = 0; i < 5; i++) begin
          diag ^= s[i] & t[i];
          for (int j = 0; j < 5; j++) u[(i + j) % 5] ^= s[i] & t[j];
        end
        u ^= {5{diag}};
        checks++;
        if (p != ^u || p1 != (u[0] ^ u[2] ^ u[4]) || p2 != (u[1] ^ u[3])) begin
          failures++;
          if (failures < 10) $display("FAIL s=%b t=%b u=%b p=%b%b%b", s, t, u, p, p1, p2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
