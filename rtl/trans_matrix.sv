// trans_matrix -- Block 1 of the error-detecting S-box: the 8x8 GF(2) matrix
// M1 that maps a byte from the AES polynomial basis into the tower field
// GF((2^4)^2), normal basis {alpha^16, alpha} over the GF(2^4) normal basis
// {beta..beta^4}. Output a = {h, l}: h = a[7:4], l = a[3:0].
// Purely combinational (one level of XOR trees, at most 5 inputs per bit).
// The matrix is the document's M1, applied with the least significant bit
// first; it was checked to be a field isomorphism.
module trans_matrix
  import sbox_ed_pkg::*;
(
  input  logic [7:0] s,
  output logic [7:0] a
);
  always_comb begin
    for (int i = 0; i < 8; i++) a[i] = ^(M1[i] & s);
  end
endmodule
