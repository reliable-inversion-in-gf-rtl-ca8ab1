// sbox_ed_pkg -- types and constants shared by the error-detecting GF(2^8)
// inverter (AES S-box) and its signature checker.
//
// Field representations used throughout:
//   * GF((2^4)^2) in the normal basis {alpha^16, alpha}: a byte a = {h, l}
//     stands for h*alpha^16 + l*alpha.
//   * GF(2^4) elements h, l in the normal basis {beta, beta^2, beta^3,
//     beta^4} (bit i <-> beta^(i+1)), where beta is a root of the all-one
//     polynomial x^4+x^3+x^2+x+1, so beta^5 = 1.
//   * Redundantly represented basis (RRB): 5 bits, value sum x_i*beta^i,
//     i = 0..4. Since 1+beta+...+beta^4 = 0, x and ~x denote the same element.
//   * Polynomial ring representation (PRR): the same 5-bit vector restricted
//     to even weight (the ring element that is zero modulo x+1).
//   * "Pair sums": for a 5-bit RRB vector x, the 10 bits x_i^x_j (i<j) in
//     the order 01,02,03,04,12,13,14,23,24,34. They do not change when x is
//     complemented, so they identify the field element uniquely.
// The matrices M1, M2, PHI1 (phi') and PHI2 (phi'') are those of the
// inverter construction this design follows; each row is one output bit and
// bit j of a row is the coefficient of input bit j (least significant bit
// first). The constant 0x63 is the AES affine constant.
package sbox_ed_pkg;

  // Bits of all unit outputs that are observed by the checker and can be hit
  // by an injected fault.
  typedef struct packed {
    logic [7:0] a;    // Block 1 output: {h, l} in normal basis
    logic [5:0] hp;   // H unit: pair sums of h (12,13,14,23,24,34)
    logic [5:0] lp;   // L unit: pair sums of l
    logic [9:0] nbh;  // NBtoRRB of h, as pair sums
    logic [9:0] nbl;  // NBtoRRB of l, as pair sums
    logic [4:0] d;    // Stage 1: a^17 in PRR
    logic [4:0] e;    // Stage 2: (a^17)^-1 in RRB
    logic [9:0] f;    // F unit: pair sums of e
    logic [4:0] hi;   // Stage 3 (upper): h' = e*l in RRB
    logic [4:0] lo;   // Stage 3 (lower): l' = e*h in RRB
    logic [7:0] o;    // last block: S-box output
  } sbox_nodes_t;

  localparam int unsigned NODE_BITS = $bits(sbox_nodes_t);  // 78

  // Block 1: polynomial basis -> tower-field normal basis.
  localparam logic [7:0] M1 [8] = '{
    8'b00111010, 8'b11000101, 8'b10001001, 8'b00100000,
    8'b00110110, 8'b00010101, 8'b10000111, 8'b10001100};

  // Last block: {h', l'} (10 bits, RRB) -> S-box output before the constant.
  localparam logic [9:0] M2 [8] = '{
    10'b0100101111, 10'b1011101100, 10'b0101001111, 10'b1011110001,
    10'b1000111011, 10'b1110110001, 10'b1010010100, 10'b1101100101};

  // Stage 1: phi' multiplies the NB product hl by (alpha+alpha^16)^2,
  // phi'' multiplies the NB value (h+l)^2 by alpha^17; both give PRR.
  localparam logic [3:0] PHI1 [5] = '{4'b0110, 4'b1100, 4'b1000, 4'b0001, 4'b0011};
  localparam logic [3:0] PHI2 [5] = '{4'b0111, 4'b1111, 4'b1110, 4'b1101, 4'b1011};

  localparam logic [7:0] AES_AFFINE_C = 8'h63;

  // Index of the pair (i,j), i<j<5, in a 10-bit pair-sum vector.
  function automatic int unsigned pair_idx(int unsigned i, int unsigned j);
    int unsigned base [5] = '{0, 4, 7, 9, 10};
    return base[i] + (j - i - 1);
  endfunction

  // RRB vector with coordinate 0 cleared, rebuilt from pair sums:
  // (0, x0^x1, x0^x2, x0^x3, x0^x4). Equals x or ~x.
  function automatic logic [4:0] rrb_from_pairs(logic [9:0] p);
    return {p[3], p[2], p[1], p[0], 1'b0};
  endfunction

endpackage
