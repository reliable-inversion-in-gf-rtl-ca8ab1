// pair_xor5 -- the F unit: the ten pairwise XORs e_i ^ e_j (0<=i<j<=4) of the
// 5-bit RRB output of the GF(2^4) inverter, in the order
// 01,02,03,04,12,13,14,23,24,34 that the Stage 3 multipliers consume.
// The result is the same for e and ~e, which removes the RRB redundancy.
// Combinational, one XOR level.
module pair_xor5
  import sbox_ed_pkg::*;
(
  input  logic [4:0] x,
  output logic [9:0] p
);
  always_comb begin
    for (int i = 0; i < 5; i++)
      for (int j = i + 1; j < 5; j++)
        p[pair_idx(i, j)] = x[i] ^ x[j];
  end
endmodule
