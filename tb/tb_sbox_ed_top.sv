// tb_sbox_ed_top -- end-to-end test of sbox_ed_top at its default parameters
// (7-block partition, parity signatures). Phases:
//   1. all 256 bytes back to back: S-box value (reference: GF(2^8) inverse
//      plus affine map), latency of exactly 2 cycles, no flag;
//   2. bubbles in in_valid: no output and no flag for idle slots;
//   3. every single-bit fault on all 78 node bits (fault_mask) for 16
//      inputs: each must be flagged;
//   4. the built-in LFSR injector with bursts of 1..4 adjacent bits: a
//      clean result must be correct and unflagged; with single-bit bursts
//      every injection must be flagged.
// Counted mechanisms (each must occur): clean result, idle slot, flagged
// fault that corrupted the output, flagged fault that did not (false
// alarm), LFSR injection, multi-bit burst, an undetected multi-bit burst is
// reported but not required.
module tb_sbox_ed_top;
  import tb_gf_ref_pkg::*;
  import sbox_ed_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_byte = '0;
  sbox_nodes_t fault_mask = '0;
  logic fi_en = 0;
  logic [2:0] fi_burst = 3'd1;
  logic [3:0] fi_rate = 4'd0;
  logic out_valid, out_err, out_fault;
  logic [7:0] out_byte;
  logic [6:0] out_err_blk;
  int cycle = 0;

  sbox_ed_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    wait (cycle == 400000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // scoreboard: expected byte and the cycle it was applied
  logic [7:0] exp_q [$];
  int         cyc_q [$];
  int n_clean = 0, n_idle = 0, n_det_corrupt = 0, n_false_alarm = 0,
      n_undet = 0, n_lfsr = 0, n_burst = 0, n_single_lfsr = 0, n_single_det = 0;
  bit lfsr_phase = 0, single_phase = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin exp_q.push_back(aes_sbox(in_byte)); cyc_q.push_back(cycle); end
  end

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      logic [7:0] e; int c;
      e = exp_q.pop_front(); c = cyc_q.pop_front();
      chk(cycle - c == 2, $sformatf("latency %0d", cycle - c));
      if (!out_fault) begin
        chk(out_byte == e && !out_err, $sformatf("clean result %h exp %h err %b", out_byte, e, out_err));
        n_clean++;
      end else begin
        if (lfsr_phase) begin
          n_lfsr++;
          if (fi_burst > 1) n_burst++;
        end
        if (lfsr_phase && single_phase) begin
          n_single_lfsr++;
          chk(out_err, "single-bit LFSR fault flagged");
          if (out_err) n_single_det++;
        end
        if (out_err && out_byte != e) n_det_corrupt++;
        else if (out_err)             n_false_alarm++;
        else if (out_byte != e)       n_undet++;
      end
    end else begin
      chk(!out_err && out_err_blk == '0, "no flag on idle slot");
      n_idle++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. all bytes back to back
    for (int x = 0; x < 256; x++) begin
      @(negedge clk); in_valid = 1; in_byte = 8'(x);
    end
    // 2. bubbles
    for (int x = 0; x < 64; x++) begin
      @(negedge clk); in_valid = x[0]; in_byte = 8'($urandom);
    end
    // 3. every single-bit fault on every node bit
    for (int k = 0; k < 16; k++)
      for (int b = 0; b < int'(NODE_BITS); b++) begin
        @(negedge clk); in_valid = 1; in_byte = 8'($urandom);
        fault_mask = sbox_nodes_t'(NODE_BITS'(1) << b);
        @(negedge clk); fault_mask = '0; in_valid = 0;
        @(negedge clk);  // the flag of this byte is checked by the monitor
        chk(out_valid && out_fault && out_err, $sformatf("single fault bit %0d flagged", b));
      end
    @(negedge clk); in_valid = 0; fault_mask = '0;
    repeat (3) @(negedge clk);
    // 4. LFSR injection, single bits then bursts
    lfsr_phase = 1; single_phase = 1;
    fi_en = 1; fi_rate = 4'd8; fi_burst = 3'd1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk); in_valid = 1; in_byte = 8'($urandom);
    end
    @(negedge clk); in_valid = 0; fi_en = 0;
    repeat (3) @(negedge clk);
    single_phase = 0;
    for (int bl = 2; bl <= 4; bl++) begin
      fi_en = 1; fi_burst = 3'(bl);
      for (int i = 0; i < 4000; i++) begin
        @(negedge clk); in_valid = 1; in_byte = 8'($urandom);
      end
      @(negedge clk); in_valid = 0; fi_en = 0;
      repeat (3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(exp_q.size() == 0, "all results came out");
    $display("mechanisms: clean=%0d idle=%0d detected_corrupt=%0d false_alarm=%0d undetected=%0d lfsr_faults=%0d bursts=%0d single_lfsr=%0d/%0d",
             n_clean, n_idle, n_det_corrupt, n_false_alarm, n_undet, n_lfsr, n_burst, n_single_det, n_single_lfsr);
    chk(n_clean > 0, "clean results seen");
    chk(n_idle > 0, "idle slots seen");
    chk(n_det_corrupt > 0, "detected corrupting faults seen");
    chk(n_false_alarm > 0, "false alarms seen");
    chk(n_lfsr > 0, "LFSR injections seen");
    chk(n_burst > 0, "multi-bit bursts seen");
    chk(n_single_lfsr > 0 && n_single_det == n_single_lfsr, "all single-bit LFSR faults flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
