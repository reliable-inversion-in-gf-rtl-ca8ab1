// tb_fault_lfsr -- compares the LFSR state sequence with a reference model
// of x^32+x^22+x^2+x+1, checks that rate 0 never injects, that an
// injecting cycle has burst adjacent ones (fewer only at the top edge),
// that the injection frequency at rate 8 is near one half, and that reset
// restarts the sequence.
module tb_fault_lfsr;
  localparam int unsigned W = 78;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] burst = 3'd1;
  logic [3:0] rate = 4'd0;
  logic [W-1:0] mask;
  int cycles = 0;
  fault_lfsr #(.WIDTH(W), .SEED(32'hACE1_2468)) dut (
    .clk, .rst_n, .en, .burst, .rate, .mask);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 200000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] ref_q;
    int hits, pos, ones, lo;
    repeat (2) @(negedge clk);
    rst_n = 1; en = 1; ref_q = 32'hACE1_2468;
    chk(dut.q == ref_q, "seed after reset");
    // rate 0: never
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ref_q = {ref_q[30:0], ref_q[31] ^ ref_q[21] ^ ref_q[1] ^ ref_q[0]};
      chk(dut.q == ref_q, "state sequence");
      chk(mask == '0, "rate 0 gives no fault");
    end
    rate = 4'd8;
    for (int bl = 1; bl < 8; bl++) begin
      burst = 3'(bl); hits = 0;
      for (int i = 0; i < 4000; i++) begin
        @(negedge clk);
        ref_q = {ref_q[30:0], ref_q[31] ^ ref_q[21] ^ ref_q[1] ^ ref_q[0]};
        chk(dut.q == ref_q, "state sequence");
        if (ref_q[3:0] < 4'd8) begin
          hits++;
          pos = int'(ref_q[31:8] % W);
          ones = $countones(mask);
          lo = -1;
          for (int k = W - 1; k >= 0; k--) if (mask[k]) lo = k;
          chk(lo == pos, "burst position");
          chk(ones == ((pos + bl > W) ? W - pos : bl), "burst length");
          chk(mask == ((W'(1) << ones) - 1'b1) << pos, "adjacent bits");
        end else begin
          chk(mask == '0, "no fault in idle cycle");
        end
      end
      chk(hits > 1700 && hits < 2300, $sformatf("rate 8 injects about half: %0d", hits));
    end
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    chk(dut.q == 32'hACE1_2468, "reset to seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
