// sig_pred_mul -- signature prediction for the RRB multiplier
// (stage3_mul_rrb) from its 5-bit operands s and t:
//   p  = sum over i != j of s_i t_j           (parity of u)
//   p1 = s0(t2+t4) + s1(t3+t4) + s2(t0+t3) + s3(t1+t2+t3+t4) + s4(t0+t1+t3+t4)
//                                              (u0+u2+u4)
//   p2 = s0(t1+t3) + s1(t0+t2) + s2(t1+t4) + s3(t0+t3) + s4(t2+t4)
//                                              (u1+u3)
// These are the construction's formulas. p is formed as
// (sum s)(sum t) + sum s_i t_i. Every bracket has an even number of terms,
// so complementing either operand leaves all three unchanged: operands
// rebuilt from pair sums as (0, x0^x1, .., x0^x4) may be used directly.
// Combinational.
module sig_pred_mul (
  input  logic [4:0] s,
  input  logic [4:0] t,
  output logic       p,
  output logic       p1,
  output logic       p2
);
  always_comb begin
    p  = (^s & ^t) ^ ^(s & t);
    p1 = (s[0] & (t[2] ^ t[4])) ^ (s[1] & (t[3] ^ t[4])) ^ (s[2] & (t[0] ^ t[3]))
       ^ (s[3] & (t[1] ^ t[2] ^ t[3] ^ t[4])) ^ (s[4] & (t[0] ^ t[1] ^ t[3] ^ t[4]));
    p2 = (s[0] & (t[1] ^ t[3])) ^ (s[1] & (t[0] ^ t[2])) ^ (s[2] & (t[1] ^ t[4]))
       ^ (s[3] & (t[0] ^ t[3])) ^ (s[4] & (t[2] ^ t[4]));
  end
endmodule
