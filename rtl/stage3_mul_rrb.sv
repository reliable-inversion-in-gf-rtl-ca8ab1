// stage3_mul_rrb -- Stage 3: multiplication in GF(2^4), operands and result
// in the redundantly represented basis (beta^5 = 1). Operands arrive as pair
// sums (see sbox_ed_pkg), so the multiplier is only 10 ANDs and 5 XORs:
//   u0 = s14 t14 + s23 t23     u1 = s01 t01 + s24 t24
//   u2 = s02 t02 + s34 t34     u3 = s03 t03 + s12 t12
//   u4 = s04 t04 + s13 t13     (sij = s_i + s_j)
// This equals the cyclic convolution s*t mod x^5-1 plus (sum s_i t_i) times
// the all-one vector, which is zero in this basis. The equations are those
// of the construction; feeding pair sums from the F and NBtoRRB units is how
// the pair sums are shared. Combinational.
module stage3_mul_rrb
  import sbox_ed_pkg::*;
(
  input  logic [9:0] sp,
  input  logic [9:0] tp,
  output logic [4:0] u
);
  logic [9:0] m;
  always_comb begin
    m    = sp & tp;
    u[0] = m[pair_idx(1, 4)] ^ m[pair_idx(2, 3)];
    u[1] = m[pair_idx(0, 1)] ^ m[pair_idx(2, 4)];
    u[2] = m[pair_idx(0, 2)] ^ m[pair_idx(3, 4)];
    u[3] = m[pair_idx(0, 3)] ^ m[pair_idx(1, 2)];
    u[4] = m[pair_idx(0, 4)] ^ m[pair_idx(1, 3)];
  end
endmodule
