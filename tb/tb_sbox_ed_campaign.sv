// tb_sbox_ed_campaign -- fault-injection campaigns on all eight detection
// configurations of sbox_ed_top (7/5/4/3 blocks, parity / interleaved
// parity), run side by side on the same inputs and the same LFSR fault
// stream. Three runs, each until every configuration has seen the target
// number of faulty results:
//   A. 35,000 single-bit faults,
//   B. 35,000 faults of 1..4 adjacent bits (burst length random per cycle),
//   C. 80,000 faults of 1..4 adjacent bits.
// For each it prints the coverage (flagged / injected) and the false-alarm
// ratio (flagged although the output byte was still correct).
// Checks: every fault-free result is the AES S-box value and unflagged;
// every configuration reaches the target; with single-bit faults the
// 7-block configurations flag every injection.
module tb_sbox_ed_campaign;
  import tb_gf_ref_pkg::*;
  import sbox_ed_pkg::*;
  localparam int unsigned NB [4] = '{7, 5, 4, 3};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, fi_en = 0;
  logic [7:0] in_byte = '0;
  logic [2:0] fi_burst = 3'd1;
  logic [3:0] fi_rate = 4'd15;
  int cycle = 0;
  logic       ov [8], oe [8], of [8];
  logic [7:0] ob [8];
  logic [6:0] oeb [8];
  int inj [8], det [8], fa [8], bad [8];
  logic [7:0] exp_d1, exp_d2;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar g = 0; g < 8; g++) begin : g_cfg
    sbox_ed_top #(.ED_BLOCKS(NB[g / 2]), .INTERLEAVED(1'(g % 2))) u_dut (
      .clk, .rst_n, .in_valid, .in_byte, .fault_mask('0), .fi_en, .fi_burst, .fi_rate,
      .out_valid(ov[g]), .out_byte(ob[g]), .out_err(oe[g]), .out_err_blk(oeb[g]),
      .out_fault(of[g]));
  end

  // expected output, two cycles behind the input
  always @(posedge clk) begin
    exp_d1 <= aes_sbox(in_byte);
    exp_d2 <= exp_d1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int g = 0; g < 8; g++) if (ov[g]) begin
      if (!of[g]) chk(ob[g] == exp_d2 && !oe[g], $sformatf("clean result cfg %0d", g));
      else begin
        inj[g]++;
        if (oe[g]) det[g]++;
        if (oe[g] && ob[g] == exp_d2) fa[g]++;
        if (!oe[g] && ob[g] != exp_d2) bad[g]++;
      end
    end
  end

  initial begin
    wait (cycle == 2000000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int min_inj();
    int m = inj[0];
    for (int g = 1; g < 8; g++) if (inj[g] < m) m = inj[g];
    return m;
  endfunction

  task automatic run(string name, int target, bit single);
    for (int g = 0; g < 8; g++) begin inj[g] = 0; det[g] = 0; fa[g] = 0; bad[g] = 0; end
    fi_en = 1;
    while (min_inj() < target) begin
      @(negedge clk);
      in_valid = 1; in_byte = 8'($urandom);
      fi_burst = single ? 3'd1 : 3'($urandom_range(1, 4));
    end
    @(negedge clk); fi_en = 0; in_valid = 0;
    repeat (3) @(negedge clk);
    for (int g = 0; g < 8; g++) begin
      $display("%s  %0d blocks %-11s injected=%0d coverage=%0.5f false_alarms=%0.5f undetected_wrong=%0d",
               name, NB[g / 2], (g % 2) ? "interleaved" : "parity", inj[g],
               real'(det[g]) / real'(inj[g]), real'(fa[g]) / real'(inj[g]), bad[g]);
      chk(inj[g] >= target, "target reached");
      if (single && NB[g / 2] == 7) chk(det[g] == inj[g], "7-block single-bit coverage is 100%");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("A 35000 single-bit  ", 35000, 1'b1);
    run("B 35000 1..4-bit    ", 35000, 1'b0);
    run("C 80000 1..4-bit    ", 80000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
