// tb_gf8_inv_core -- the datapath with no fault must give the AES S-box for
// all 256 bytes (reference: GF(2^8) inversion plus affine map), with an
// even-weight Stage 1 output. Then a fault on each output bit must flip
// exactly that output bit, and a fault on an internal node must reach the
// output for at least some inputs.
module tb_gf8_inv_core;
  import tb_gf_ref_pkg::*;
  import sbox_ed_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] s;
  sbox_nodes_t fault, n;
  gf8_inv_core dut (.s(s), .fault(fault), .n(n));
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    logic [7:0] good;
    int reached;
    fault = '0;
    for (int x = 0; x < 256; x++) begin
      s = 8'(x); #1;
      chk(n.o == aes_sbox(s), $sformatf("sbox %h -> %h", s, n.o));
      chk(!(^n.d), "stage 1 parity");
    end
    for (int b = 0; b < 8; b++) begin
      s = 8'h5a; fault = '0; #1; good = n.o;
      fault.o = 8'(1) << b; #1;
      chk(n.o == (good ^ (8'(1) << b)), "output fault");
    end
    // a fault on e (Stage 2 output) must corrupt the output for some inputs
    reached = 0;
    for (int x = 0; x < 256; x++) begin
      s = 8'(x); fault = '0; fault.e = 5'b00100; #1;
      if (n.o != aes_sbox(s)) reached++;
    end
    chk(reached > 0, "fault on e reaches the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
