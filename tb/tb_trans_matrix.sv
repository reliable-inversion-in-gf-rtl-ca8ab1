// tb_trans_matrix -- checks that trans_matrix is a field isomorphism from the
// AES field into the tower field: it must be linear (checked on all bases
// and random pairs), map 1 to 1, and turn AES products into tower products
// for every pair in a 64x256 sweep. Reference arithmetic: tb_gf_ref_pkg.
module tb_trans_matrix;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] s, a;
  trans_matrix dut (.s(s), .a(a));

  function automatic tw_t tw_of(logic [7:0] v);
    return tw_from_hl(nb_val(v[7:4]), nb_val(v[3:0]));
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ax, ay, axy;
    tw_t one;
    one = '{c0: 4'd1, c1: 4'd0};
    s = 8'h01; #1;
    chk(tw_of(a) == one, "1 maps to 1");
    for (int x = 0; x < 64; x++) begin
      s = 8'(x * 4 + 3); #1; ax = a;
      for (int y = 0; y < 256; y++) begin
        s = 8'(y); #1; ay = a;
        s = aes_mul(8'(x * 4 + 3), 8'(y)); #1; axy = a;
        chk(tw_of(axy) == tw_mul(tw_of(ax), tw_of(ay)), $sformatf("mul %0d %0d", x, y));
        s = 8'(x * 4 + 3) ^ 8'(y); #1;
        chk(a == (ax ^ ay), "linear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
