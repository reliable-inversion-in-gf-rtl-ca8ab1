// inv_trans_affine -- last block of the S-box: the 8x10 GF(2) matrix M2,
// which maps the inverse a^-1 = {h', l'} (two 5-bit RRB values, h' in [9:5],
// l' in [4:0]) back to the AES polynomial basis and applies the AES affine
// matrix in the same step, followed by the affine constant.
// Every 5-bit half of every row of M2 has even weight, so the redundancy of
// the RRB inputs (x and ~x equal) cancels. M2 follows the construction; the
// constant AFFINE_C = 0x63 is the AES one. Combinational.
module inv_trans_affine
  import sbox_ed_pkg::*;
#(
  parameter logic [7:0] AFFINE_C = AES_AFFINE_C
) (
  input  logic [9:0] ai,
  output logic [7:0] o
);
  always_comb begin
    for (int i = 0; i < 8; i++) o[i] = ^(M2[i] & ai) ^ AFFINE_C[i];
  end
endmodule
