// tb_gf_ref_pkg -- reference arithmetic for the testbenches, written without
// any of the design's formulas:
//   * GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1, inverse as a^254, and
//     the AES S-box from its affine definition.
//   * GF(2^4) in polynomial basis modulo x^4+x+1; beta is found as an
//     element of order 5; rrb_val() maps a 5-bit RRB/PRR vector to its field
//     value sum x_i beta^i, nb_val() a 4-bit NB vector (bit i <-> beta^(i+1)).
//   * The tower field GF((2^4)^2) with a = h alpha^16 + l alpha, alpha a root
//     of X^2 + tau X + nu, tau = beta + beta^4, nu = beta.
package tb_gf_ref_pkg;

  function automatic logic [7:0] aes_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] aes_inv(logic [7:0] a);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < 254; i++) r = aes_mul(r, a);
    return r;
  endfunction

  function automatic logic [7:0] aes_sbox(logic [7:0] x);
    logic [7:0] b = aes_inv(x);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [3:0] g16_mul(logic [3:0] a, logic [3:0] b);
    logic [7:0] r = '0;
    for (int i = 0; i < 4; i++) if (b[i]) r ^= 8'(a) << i;
    for (int i = 7; i >= 4; i--) if (r[i]) r ^= 8'b0001_0011 << (i - 4);
    return r[3:0];
  endfunction

  function automatic logic [3:0] g16_pow(logic [3:0] a, int n);
    logic [3:0] r = 4'd1;
    for (int i = 0; i < n; i++) r = g16_mul(r, a);
    return r;
  endfunction

  function automatic logic [3:0] g16_inv(logic [3:0] a);
    return g16_pow(a, 14);  // 0 -> 0
  endfunction

  function automatic logic [3:0] beta();
    for (int x = 2; x < 16; x++) if (g16_pow(4'(x), 5) == 4'd1) return 4'(x);
    return 4'd0;
  endfunction

  function automatic logic [3:0] rrb_val(logic [4:0] v);
    logic [3:0] r = '0;
    for (int i = 0; i < 5; i++) if (v[i]) r ^= g16_pow(beta(), i);
    return r;
  endfunction

  function automatic logic [3:0] nb_val(logic [3:0] v);
    return rrb_val({v, 1'b0});
  endfunction

  // NB coordinates (bit i <-> beta^(i+1)) of a field value
  function automatic logic [3:0] to_nb(logic [3:0] x);
    for (int v = 0; v < 16; v++) if (nb_val(4'(v)) == x) return 4'(v);
    return '0;
  endfunction

  function automatic logic [3:0] tau();  return rrb_val(5'b10010); endfunction
  function automatic logic [3:0] nu();   return rrb_val(5'b00010); endfunction

  // Tower element as (c0, c1) = c0 + c1*alpha, from (h, l) field values:
  // h alpha^16 + l alpha = h*tau + (h+l)*alpha  since alpha^16 = tau + alpha
  typedef struct packed { logic [3:0] c0; logic [3:0] c1; } tw_t;

  function automatic tw_t tw_from_hl(logic [3:0] h, logic [3:0] l);
    tw_t r;
    r.c0 = g16_mul(h, tau());
    r.c1 = h ^ l;
    return r;
  endfunction

  function automatic tw_t tw_mul(tw_t p, tw_t q);
    logic [3:0] c0, c1, c2;
    tw_t r;
    c0 = g16_mul(p.c0, q.c0);
    c1 = g16_mul(p.c0, q.c1) ^ g16_mul(p.c1, q.c0);
    c2 = g16_mul(p.c1, q.c1);
    r.c0 = c0 ^ g16_mul(c2, nu());   // alpha^2 = tau alpha + nu
    r.c1 = c1 ^ g16_mul(c2, tau());
    return r;
  endfunction

  // tower element -> field values (h, l); inverse of tw_from_hl
  function automatic void tw_to_hl(tw_t t, output logic [3:0] h, output logic [3:0] l);
    h = g16_mul(t.c0, g16_inv(tau()));
    l = t.c1 ^ h;
  endfunction

  function automatic tw_t tw_inv(tw_t t);
    tw_t r = '{c0: 4'd1, c1: 4'd0};
    for (int i = 0; i < 254; i++) r = tw_mul(r, t);
    return r;
  endfunction

  // a 5-bit RRB vector of value x (coordinate 0 zero, optionally complemented)
  function automatic logic [4:0] rrb_of(logic [3:0] x, bit flip);
    logic [4:0] v = {to_nb(x), 1'b0};
    return flip ? ~v : v;
  endfunction

  function automatic logic [9:0] pairs_of(logic [4:0] v);
    logic [9:0] p;
    int k = 0;
    for (int i = 0; i < 5; i++)
      for (int j = i + 1; j < 5; j++) begin
        p[k] = v[i] ^ v[j];
        k++;
      end
    return p;
  endfunction

endpackage
