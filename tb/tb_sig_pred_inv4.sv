// tb_sig_pred_inv4 -- for all 32 inputs d (both weights), the predicted
// parity and interleaved parities must equal those of the inverter output
// e of stage2_inv4. For the even-weight inputs the inverter output is
// itself checked against the field inverse of the reference arithmetic, so
// the predictions are tied to the field, not only to the inverter.
module tb_sig_pred_inv4;
  import tb_gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] d, e;
  logic p, p1, p2;
  sig_pred_inv4 dut (.d(d), .p(p), .p1(p1), .p2(p2));
  stage2_inv4   inv (.d(d), .e(e));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      d = 5'(v); #1;
      // the inverter itself is checked against the field in its own test;
      // here the signatures must agree with its output for every input
      checks++;
      if (p != ^e || p1 != (e[0] ^ e[2] ^ e[4]) || p2 != (e[1] ^ e[3])) begin
        failures++; $display("FAIL d=%b e=%b p=%b%b%b", d, e, p, p1, p2);
      end
      if (!(^d) && d != 0) begin
        checks++;
        if (rrb_val(e) != g16_inv(rrb_val(d))) begin
          failures++; $display("FAIL inverse d=%b", d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
