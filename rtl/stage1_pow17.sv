// stage1_pow17 -- Stage 1 of the inverter: the norm d = a^17 of the tower
// field element a = h*alpha^16 + l*alpha, i.e.
//     d = phi'(h*l) + phi''((h+l)^2)
// with h, l in the GF(2^4) normal basis and d in the polynomial ring
// representation (5 bits, always of even weight).
// How it works: the normal-basis product h*l is taken from the RRB product
// formula with coordinate 0 equal to zero, using the plain bits and the H/L
// pair sums (5 AND pairs, 9 XORs); its coordinate 0 is then cancelled to
// give 4 NB bits. (h+l)^2 is a bit permutation of h^l (NB squaring). The
// matrices phi' and phi'' (PHI1/PHI2 in sbox_ed_pkg) then give the PRR
// result. Every column of both matrices has even weight, which is why the
// parity of d is 0 for every input.
// The phi'/phi'' matrices and the overall formula follow the construction;
// how h*l is formed from h, l, H and L is this design's own choice.
// Combinational.
module stage1_pow17
  import sbox_ed_pkg::*;
(
  input  logic [3:0] h,
  input  logic [3:0] l,
  input  logic [5:0] hp,   // h pair sums 12,13,14,23,24,34
  input  logic [5:0] lp,   // l pair sums
  output logic [4:0] d
);
  logic [4:0] u;   // RRB product h*l (coordinate 0 of both operands is 0)
  logic [3:0] c;   // NB product h*l
  logic [3:0] x;   // h + l
  logic [3:0] sq;  // (h + l)^2 in NB

  always_comb begin
    u[0] = (hp[2] & lp[2]) ^ (hp[3] & lp[3]);  // (1,4),(2,3)
    u[1] = (h[0]  & l[0])  ^ (hp[4] & lp[4]);  // (0,1),(2,4)
    u[2] = (h[1]  & l[1])  ^ (hp[5] & lp[5]);  // (0,2),(3,4)
    u[3] = (h[2]  & l[2])  ^ (hp[0] & lp[0]);  // (0,3),(1,2)
    u[4] = (h[3]  & l[3])  ^ (hp[1] & lp[1]);  // (0,4),(1,3)
    c    = u[4:1] ^ {4{u[0]}};
    x    = h ^ l;
    // beta^i -> beta^(2i): positions 1,2,3,4 -> 2,4,1,3
    sq   = {x[1], x[3], x[0], x[2]};
    for (int i = 0; i < 5; i++) d[i] = ^(PHI1[i] & c) ^ ^(PHI2[i] & sq);
  end
endmodule
