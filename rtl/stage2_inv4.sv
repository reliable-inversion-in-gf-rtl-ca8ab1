// stage2_inv4 -- Stage 2 of the inverter: inversion in GF(2^4). The input d
// is in the polynomial ring representation (5 bits of even weight, value
// sum d_i*beta^i), the output e = d^-1 in the redundantly represented basis
// (5 bits, e and ~e equal). Zero maps to zero.
// Each output bit is one AND-OR term pair:
//   e0 = (d1|d4)(d2|d3)
//   e1 = ~d4(d1^d2) | d0 d4 (d2|d3)     e2 = ~d3(d2^d4) | d0 d3 (d1|d4)
//   e3 = ~d2(d1^d3) | d0 d2 (d1|d4)     e4 = ~d1(d3^d4) | d0 d1 (d2|d3)
// These are the inverter equations of the construction. They rely on the
// even weight of d; an odd-weight d (only possible after a fault upstream)
// gives a wrong but well-defined result. Combinational.
module stage2_inv4 (
  input  logic [4:0] d,
  output logic [4:0] e
);
  always_comb begin
    e[0] = (d[1] | d[4]) & (d[2] | d[3]);
    e[1] = (~d[4] & (d[1] ^ d[2])) | (d[0] & d[4] & (d[2] | d[3]));
    e[2] = (~d[3] & (d[2] ^ d[4])) | (d[0] & d[3] & (d[1] | d[4]));
    e[3] = (~d[2] & (d[1] ^ d[3])) | (d[0] & d[2] & (d[1] | d[4]));
    e[4] = (~d[1] & (d[3] ^ d[4])) | (d[0] & d[1] & (d[2] | d[3]));
  end
endmodule
