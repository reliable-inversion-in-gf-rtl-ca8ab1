// gf8_inv_core -- combinational datapath of the S-box built on redundant
// GF(2^4) arithmetic (the error-detection checker is separate, ed_checker).
//
//   s --M1--> a = {h,l} --H,L units--> hp, lp
//             {h,hp}, {l,lp} --NBtoRRB (wiring)--> nbh, nbl   (pair sums)
//             h,l,hp,lp --Stage 1--> d = a^17 (PRR)
//             d --Stage 2--> e = d^-1 (RRB)
//             e --F unit--> f (pair sums of e)
//             nbl,f --Stage 3--> h' = e*l ;  nbh,f --Stage 3--> l' = e*h
//             {h',l'} --M2 + 0x63--> o = AES S-box(s)
//
// a^-1 = a^16 * (a^17)^-1 with a^16 = l*alpha^16 + h*alpha, hence h' = e*l and
// l' = e*h. Every unit output passes through an XOR with the matching field
// of `fault` before it is used, so that a testbench or the built-in LFSR can
// flip any bit the checker observes; with fault = 0 the XORs are transparent
// and synthesis removes them when the port is tied off. Output `n` carries
// all unit outputs (after fault injection) to the checker.
// The unit structure follows the construction; the fault-injection XORs
// and the pair-sum bit orders are choices of this design.
module gf8_inv_core
  import sbox_ed_pkg::*;
(
  input  logic [7:0]  s,
  input  sbox_nodes_t fault,
  output sbox_nodes_t n
);
  sbox_nodes_t raw;

  trans_matrix u_m1 (.s(s), .a(raw.a));
  assign n.a = raw.a ^ fault.a;

  pair_xor4 u_h (.x(n.a[7:4]), .p(raw.hp));
  pair_xor4 u_l (.x(n.a[3:0]), .p(raw.lp));
  assign n.hp = raw.hp ^ fault.hp;
  assign n.lp = raw.lp ^ fault.lp;

  // NBtoRRB: NB coordinates are RRB coordinates 1..4 with coordinate 0 = 0,
  // so the pair sums are the plain bits (pairs 0j) and the H/L sums.
  assign raw.nbh = {n.hp, n.a[7:4]};
  assign raw.nbl = {n.lp, n.a[3:0]};
  assign n.nbh   = raw.nbh ^ fault.nbh;
  assign n.nbl   = raw.nbl ^ fault.nbl;

  stage1_pow17 u_st1 (.h(n.a[7:4]), .l(n.a[3:0]), .hp(n.hp), .lp(n.lp), .d(raw.d));
  assign n.d = raw.d ^ fault.d;

  stage2_inv4 u_st2 (.d(n.d), .e(raw.e));
  assign n.e = raw.e ^ fault.e;

  pair_xor5 u_f (.x(n.e), .p(raw.f));
  assign n.f = raw.f ^ fault.f;

  stage3_mul_rrb u_st3h (.sp(n.nbl), .tp(n.f), .u(raw.hi));
  stage3_mul_rrb u_st3l (.sp(n.nbh), .tp(n.f), .u(raw.lo));
  assign n.hi = raw.hi ^ fault.hi;
  assign n.lo = raw.lo ^ fault.lo;

  inv_trans_affine u_m2 (.ai({n.hi, n.lo}), .o(raw.o));
  assign n.o = raw.o ^ fault.o;
endmodule
