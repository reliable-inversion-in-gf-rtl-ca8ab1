// tb_ed_checker -- gf8_inv_core with an ed_checker for every partition
// (7, 5, 4, 3 blocks) and both signature kinds. For each:
//   * no fault, all 256 inputs: no flag;
//   * a single-bit fault on Stage 2's output e, the Stage 1 output d and the
//     S-box output o: always flagged (these nodes end a block in every
//     partition, and the block's prediction does not depend on them);
//   * for 7 blocks with parity: every single-bit fault on any of the 78
//     node bits is flagged, for 32 inputs.
module tb_ed_checker;
  import sbox_ed_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] s;
  sbox_nodes_t fault;
  sbox_nodes_t n [8];
  logic [6:0] eb [8];
  logic       er [8];
  localparam int unsigned NB [4] = '{7, 5, 4, 3};

  for (genvar g = 0; g < 8; g++) begin : g_cfg
    gf8_inv_core u_core (.s(s), .fault(fault), .n(n[g]));
    ed_checker #(.ED_BLOCKS(NB[g / 2]), .INTERLEAVED(1'(g % 2))) u_chk (
      .s(s), .n(n[g]), .err_blk(eb[g]), .err(er[g]));
  end

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    sbox_nodes_t f;
    fault = '0;
    for (int x = 0; x < 256; x++) begin
      s = 8'(x); #1;
      for (int g = 0; g < 8; g++) chk(!er[g], $sformatf("false flag cfg %0d x=%h", g, x));
    end
    for (int x = 0; x < 256; x += 7) begin
      s = 8'(x);
      for (int b = 0; b < 5; b++) begin
        f = '0; f.e = 5'(1) << b; fault = f; #1;
        for (int g = 0; g < 8; g++) chk(er[g], $sformatf("e fault cfg %0d x=%h b=%0d", g, x, b));
        f = '0; f.d = 5'(1) << b; fault = f; #1;
        for (int g = 0; g < 8; g++) chk(er[g], $sformatf("d fault cfg %0d x=%h b=%0d", g, x, b));
      end
      for (int b = 0; b < 8; b++) begin
        f = '0; f.o = 8'(1) << b; fault = f; #1;
        for (int g = 0; g < 8; g++) chk(er[g], $sformatf("o fault cfg %0d x=%h b=%0d", g, x, b));
      end
    end
    for (int x = 0; x < 256; x += 8) begin
      s = 8'(x);
      for (int b = 0; b < int'(NODE_BITS); b++) begin
        fault = sbox_nodes_t'(NODE_BITS'(1) << b); #1;
        chk(er[0], $sformatf("7-block single fault x=%h bit=%0d", x, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
