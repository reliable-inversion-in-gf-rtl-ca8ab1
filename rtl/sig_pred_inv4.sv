// sig_pred_inv4 -- signature prediction for the GF(2^4) inverter
// (stage2_inv4) from its input d alone:
//   p  : parity of e, the closed form
//        d1 d2 d3 ~(d0^d4) ^ ~d0 (d2 d3 d4 ^ d1 d3 d4 ^ d1 d2 d4)
//        (the construction's formula; exact for all 32 inputs)
//   p1 : e0^e2^e4,  p2 : e1^e3  (interleaved parities). These two are
//        written out from the inverter equations, so they are exact for
//        every input, including odd-weight ones.
// Combinational.
module sig_pred_inv4 (
  input  logic [4:0] d,
  output logic       p,
  output logic       p1,
  output logic       p2
);
  logic t0, t1, t2, t3, t4;
  always_comb begin
    p  = (d[1] & d[2] & d[3] & ~(d[0] ^ d[4]))
       ^ (~d[0] & ((d[2] & d[3] & d[4]) ^ (d[1] & d[3] & d[4]) ^ (d[1] & d[2] & d[4])));
    t0 = (d[1] | d[4]) & (d[2] | d[3]);
    t1 = (~d[4] & (d[1] ^ d[2])) | (d[0] & d[4] & (d[2] | d[3]));
    t2 = (~d[3] & (d[2] ^ d[4])) | (d[0] & d[3] & (d[1] | d[4]));
    t3 = (~d[2] & (d[1] ^ d[3])) | (d[0] & d[2] & (d[1] | d[4]));
    t4 = (~d[1] & (d[3] ^ d[4])) | (d[0] & d[1] & (d[2] | d[3]));
    p1 = t0 ^ t2 ^ t4;
    p2 = t1 ^ t3;
  end
endmodule
