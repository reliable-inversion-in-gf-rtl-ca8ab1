// tb_inv_trans_affine -- for every byte x, the reference computes the
// tower-field inverse of M1*x (M1 from the package), writes h', l' as RRB
// vectors (each randomly complemented, to exercise the redundancy) and
// checks that the last block returns the AES S-box value of x.
module tb_inv_trans_affine;
  import tb_gf_ref_pkg::*;
  import sbox_ed_pkg::M1;
  int checks = 0, failures = 0;
  logic [9:0] ai;
  logic [7:0] o;
  inv_trans_affine dut (.ai(ai), .o(o));
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] a;
    logic [3:0] hi, lo;
    tw_t t;
    for (int x = 0; x < 256; x++) begin
      for (int i = 0; i < 8; i++) a[i] = ^(M1[i] & 8'(x));
      t = tw_inv(tw_from_hl(nb_val(a[7:4]), nb_val(a[3:0])));
      tw_to_hl(t, hi, lo);
      for (int rep = 0; rep < 2; rep++) begin
        ai = {rrb_of(hi, 1'($urandom)), rrb_of(lo, 1'($urandom))}; #1;
        checks++;
        if (o != aes_sbox(8'(x))) begin
          failures++; if (failures < 10) $display("FAIL x=%h o=%h", x, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
