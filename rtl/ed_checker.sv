// ed_checker -- concurrent error detection for gf8_inv_core. The datapath is
// cut into ED_BLOCKS blocks; for each block a signature of its outputs
// (actual) is compared with a signature predicted from its inputs. A
// mismatch raises that block's bit in err_blk; err is their OR.
//
// Partitions (ED_BLOCKS):
//   7 : M1 | H,L | NBtoRRB + Stage 1 | Stage 2 | F | Stage 3 x2 | M2
//   5 : M1 + H,L | NBtoRRB + Stage 1 | Stage 2 | F + Stage 3 | M2
//   4 : M1 | H,L + NBtoRRB + Stage 1 | Stage 2 | F + Stage 3 + M2
//   3 : M1 + H,L + NBtoRRB + Stage 1 | Stage 2 | F + Stage 3 + M2
// Signatures: INTERLEAVED = 0 uses one parity per block; INTERLEAVED = 1
// uses two interleaved parities (even / odd bit positions) for the blocks
// whose predictions exist in that form (M1, Stage 2, Stage 3, M2, and the
// merged blocks that end in them); the others keep one parity.
// Predictions used:
//   M1       : parity = s1^..^s6, even bits = s1, odd bits = s2^..^s6
//   H, L     : parity(H) = parity(h) (each bit sits in three pair sums)
//   NBtoRRB, Stage 1, F : parity 0 (pair sums of a 5-bit value, and the
//              even-weight columns of phi', phi'')
//   Stage 2  : sig_pred_inv4;  Stage 3 : sig_pred_mul
//   M2       : parity = a1^a2, even = a0^a1^a2^a3^a6^a7, odd = a0^a3^a6^a7
//              of its 10-bit input (0x63 has even weight in both halves)
// The per-unit formulas follow the construction (M1, M2, Stage 1-3); the
// H/L, NBtoRRB and F signatures and the way merged blocks (5/4/3) are
// signed are this design's own: a merged block that ends in M2 recomputes
// the product bits that the M2 parities depend on from its inputs.
// Combinational; outputs err_blk[ED_BLOCKS-1:0] are meaningful, the rest 0.
module ed_checker
  import sbox_ed_pkg::*;
#(
  parameter int unsigned ED_BLOCKS   = 7,
  parameter bit          INTERLEAVED = 1'b0
) (
  input  logic [7:0]  s,
  input  sbox_nodes_t n,
  output logic [6:0]  err_blk,
  output logic        err
);
  if (!(ED_BLOCKS inside {3, 4, 5, 7})) begin : g_bad_param
    $error("ed_checker: ED_BLOCKS must be 3, 4, 5 or 7");
  end

  // ---- predictions from block inputs --------------------------------------
  logic pb1, p1b1, p2b1;                 // M1 (Theorem on M1 column weights)
  logic pinv, p1inv, p2inv;              // Stage 2
  logic [4:0] sh, sl;                    // operands rebuilt from NBtoRRB pair sums
  logic [4:0] te;                        // multiplier operand e (or rebuilt from F)
  logic ph, p1h, p2h, pl, p1l, p2l;      // Stage 3, upper (h') and lower (l')
  logic [9:0] ep;                        // local pair sums of e (merged last block)
  logic [4:0] rhi, rlo;                  // local recomputation of h', l'
  logic [9:0] ai_r;
  logic plb_r, p1lb_r, p2lb_r;           // M2 parities from recomputed a^-1
  logic [9:0] ai;
  logic plb, p1lb, p2lb;                 // M2 parities from the actual a^-1

  assign pb1  = ^s[6:1];
  assign p1b1 = s[1];
  assign p2b1 = ^s[6:2];

  sig_pred_inv4 u_pinv (.d(n.d), .p(pinv), .p1(p1inv), .p2(p2inv));

  assign sh = rrb_from_pairs(n.nbh);
  assign sl = rrb_from_pairs(n.nbl);
  // 7 blocks: F is its own block, so the Stage 3 block sees F's outputs;
  // otherwise F is inside the block and e is the block input.
  assign te = (ED_BLOCKS == 7) ? rrb_from_pairs(n.f) : n.e;

  sig_pred_mul u_pmh (.s(sl), .t(te), .p(ph), .p1(p1h), .p2(p2h));
  sig_pred_mul u_pml (.s(sh), .t(te), .p(pl), .p1(p1l), .p2(p2l));

  pair_xor5      u_ep   (.x(n.e), .p(ep));
  stage3_mul_rrb u_rhi  (.sp(n.nbl), .tp(ep), .u(rhi));
  stage3_mul_rrb u_rlo  (.sp(n.nbh), .tp(ep), .u(rlo));
  assign ai_r   = {rhi, rlo};
  assign plb_r  = ai_r[1] ^ ai_r[2];
  assign p1lb_r = ai_r[0] ^ ai_r[1] ^ ai_r[2] ^ ai_r[3] ^ ai_r[6] ^ ai_r[7];
  assign p2lb_r = ai_r[0] ^ ai_r[3] ^ ai_r[6] ^ ai_r[7];

  assign ai   = {n.hi, n.lo};
  assign plb  = ai[1] ^ ai[2];
  assign p1lb = ai[0] ^ ai[1] ^ ai[2] ^ ai[3] ^ ai[6] ^ ai[7];
  assign p2lb = ai[0] ^ ai[3] ^ ai[6] ^ ai[7];

  // ---- actual signatures of block outputs ----------------------------------
  logic a_ev, a_od, o_ev, o_od, e_ev, e_od, hl_ev, hl_od;
  logic [3:0] nb_ev_bits, nb_od_bits;
  assign a_ev  = n.a[0] ^ n.a[2] ^ n.a[4] ^ n.a[6];
  assign a_od  = n.a[1] ^ n.a[3] ^ n.a[5] ^ n.a[7];
  assign o_ev  = n.o[0] ^ n.o[2] ^ n.o[4] ^ n.o[6];
  assign o_od  = n.o[1] ^ n.o[3] ^ n.o[5] ^ n.o[7];
  assign e_ev  = n.e[0] ^ n.e[2] ^ n.e[4];
  assign e_od  = n.e[1] ^ n.e[3];
  assign hl_ev = n.hi[0] ^ n.hi[2] ^ n.hi[4] ^ n.lo[0] ^ n.lo[2] ^ n.lo[4];
  assign hl_od = n.hi[1] ^ n.hi[3] ^ n.lo[1] ^ n.lo[3];
  // NBtoRRB pairs (0,j) are copies of a: bit j-1 of h or l
  assign nb_ev_bits = {n.nbh[2], n.nbh[0], n.nbl[2], n.nbl[0]};  // a6,a4,a2,a0
  assign nb_od_bits = {n.nbh[3], n.nbh[1], n.nbl[3], n.nbl[1]};  // a7,a5,a3,a1

  // Per block: two signature bits (bit 1 unused in parity mode).
  logic [1:0] act [7];
  logic [1:0] pre [7];

  // Signature pairs of the reusable unit blocks.
  logic [1:0] m1_act, m1_pre, st2_act, st2_pre, st3_act, st3_pre, m2_act, m2_pre,
              m2r_pre;
  always_comb begin
    if (INTERLEAVED) begin
      m1_act  = {a_od, a_ev};          m1_pre  = {p2b1, p1b1};
      st2_act = {e_od, e_ev};          st2_pre = {p2inv, p1inv};
      st3_act = {hl_od, hl_ev};        st3_pre = {p2h ^ p2l, p1h ^ p1l};
      m2_act  = {o_od, o_ev};          m2_pre  = {p2lb, p1lb};
      m2r_pre = {p2lb_r, p1lb_r};
    end else begin
      m1_act  = {1'b0, ^n.a};          m1_pre  = {1'b0, pb1};
      st2_act = {1'b0, ^n.e};          st2_pre = {1'b0, pinv};
      st3_act = {1'b0, ^n.hi ^ ^n.lo}; st3_pre = {1'b0, ph ^ pl};
      m2_act  = {1'b0, ^n.o};          m2_pre  = {1'b0, plb};
      m2r_pre = {1'b0, plb_r};
    end
  end

  always_comb begin
    for (int b = 0; b < 7; b++) begin
      act[b] = '0;
      pre[b] = '0;
    end
    case (ED_BLOCKS)
      7: begin
        act[0] = m1_act;  pre[0] = m1_pre;
        act[1] = {1'b0, ^n.hp ^ ^n.lp};            pre[1] = {1'b0, ^n.a};
        act[2] = {1'b0, ^n.nbh ^ ^n.nbl ^ ^n.d};   pre[2] = 2'b00;
        act[3] = st2_act; pre[3] = st2_pre;
        act[4] = {1'b0, ^n.f};                     pre[4] = 2'b00;
        act[5] = st3_act; pre[5] = st3_pre;
        act[6] = m2_act;  pre[6] = m2_pre;
      end
      5: begin
        act[0] = {1'b0, ^n.hp ^ ^n.lp};            pre[0] = {1'b0, pb1};
        act[1] = {1'b0, ^n.nbh ^ ^n.nbl ^ ^n.d};   pre[1] = 2'b00;
        act[2] = st2_act; pre[2] = st2_pre;
        act[3] = st3_act; pre[3] = st3_pre;
        act[4] = m2_act;  pre[4] = m2_pre;
      end
      4: begin
        act[0] = m1_act;  pre[0] = m1_pre;
        act[1] = {1'b0, ^n.nbh[9:4] ^ ^n.nbl[9:4] ^ ^n.d};  pre[1] = {1'b0, ^n.a};
        act[2] = st2_act; pre[2] = st2_pre;
        act[3] = m2_act;  pre[3] = m2r_pre;
      end
      default: begin  // 3
        if (INTERLEAVED) begin
          act[0] = {^nb_od_bits ^ ^n.d, ^nb_ev_bits};  pre[0] = {p2b1, p1b1};
        end else begin
          act[0] = {1'b0, ^nb_ev_bits ^ ^nb_od_bits ^ ^n.d};  pre[0] = {1'b0, pb1};
        end
        act[1] = st2_act; pre[1] = st2_pre;
        act[2] = m2_act;  pre[2] = m2r_pre;
      end
    endcase
    for (int b = 0; b < 7; b++) err_blk[b] = |(act[b] ^ pre[b]);
  end

  assign err = |err_blk;
endmodule
