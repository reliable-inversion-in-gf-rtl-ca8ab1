// pair_xor4 -- the H and L units: the six pairwise XORs x_i ^ x_j of a 4-bit
// normal-basis GF(2^4) element, numbered 1..4 as in the construction
// (bit k of x is x_(k+1)). Output order 12,13,14,23,24,34 (this order is a
// choice of this design). Combinational, one XOR level.
module pair_xor4 (
  input  logic [3:0] x,
  output logic [5:0] p
);
  always_comb begin
    p[0] = x[0] ^ x[1];  // 12
    p[1] = x[0] ^ x[2];  // 13
    p[2] = x[0] ^ x[3];  // 14
    p[3] = x[1] ^ x[2];  // 23
    p[4] = x[1] ^ x[3];  // 24
    p[5] = x[2] ^ x[3];  // 34
  end
endmodule
