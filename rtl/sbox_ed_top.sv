// sbox_ed_top -- AES S-box (multiplicative inversion in GF(2^8) with the
// input isomorphism and the affine transformation folded in) built on
// redundant GF(2^4) arithmetic, with concurrent signature-based error
// detection.
//
// Structure: input register -> gf8_inv_core (combinational) and
// ed_checker -> output register. A byte presented with in_valid appears on
// out_byte with out_valid two clock edges later; one byte per cycle.
// out_err is set when any block's actual signature differs from its
// predicted one; out_err_blk tells which block(s) (bit b = block b+1).
//
// Fault injection, for evaluation: fault_mask (registered with the input
// byte) and, when fi_en is set, the internal fault_lfsr are XORed together
// onto the datapath nodes (layout: sbox_nodes_t). out_fault reports that a
// non-zero mask hit the result shown. Tie fault_mask and fi_en to 0 in use.
//
// Parameters: ED_BLOCKS (7, 5, 4 or 3) selects the block partition of the
// error detection, INTERLEAVED selects parity (0) or interleaved parities
// (1). The defaults, 7 blocks with parity, are the first construction of
// the design. The I/O registers and the reset are this design's own
// choices. Reset: synchronous, active low, clears the valid bits and flags.
module sbox_ed_top
  import sbox_ed_pkg::*;
#(
  parameter int unsigned ED_BLOCKS   = 7,
  parameter bit          INTERLEAVED = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  input  sbox_nodes_t fault_mask,
  input  logic        fi_en,
  input  logic [2:0]  fi_burst,
  input  logic [3:0]  fi_rate,
  output logic        out_valid,
  output logic [7:0]  out_byte,
  output logic        out_err,
  output logic [6:0]  out_err_blk,
  output logic        out_fault
);
  logic        v_q;
  logic [7:0]  s_q;
  sbox_nodes_t fm_q, lfsr_mask, fault, nodes;
  logic [6:0]  err_blk;
  logic        err;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q  <= 1'b0;
      s_q  <= '0;
      fm_q <= '0;
    end else begin
      v_q  <= in_valid;
      s_q  <= in_byte;
      fm_q <= fault_mask;
    end
  end

  fault_lfsr #(.WIDTH(NODE_BITS)) u_fi (
    .clk, .rst_n, .en(fi_en), .burst(fi_burst), .rate(fi_rate), .mask(lfsr_mask)
  );

  assign fault = fm_q ^ lfsr_mask;

  gf8_inv_core u_core (.s(s_q), .fault(fault), .n(nodes));

  ed_checker #(.ED_BLOCKS(ED_BLOCKS), .INTERLEAVED(INTERLEAVED)) u_chk (
    .s(s_q), .n(nodes), .err_blk(err_blk), .err(err)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_byte    <= '0;
      out_err     <= 1'b0;
      out_err_blk <= '0;
      out_fault   <= 1'b0;
    end else begin
      out_valid   <= v_q;
      out_byte    <= nodes.o;
      out_err     <= err & v_q;
      out_err_blk <= err_blk & {7{v_q}};
      out_fault   <= (|fault) & v_q;
    end
  end

  // With no fault applied, a flag is a checker or datapath bug.
  a_no_false_flag : assert property (@(posedge clk) disable iff (!rst_n)
    (v_q && fault == '0) |-> !err);
endmodule
