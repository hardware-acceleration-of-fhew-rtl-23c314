// tb_ref_pkg: reference models for the testbenches, written directly from
// the definitions rather than from the hardware's algorithms.
//   ntt_ref:  X[k] = sum_i x_i * psi^((2*brv(k)+1)*i) mod Q, the negacyclic
//             NTT evaluated at the odd powers of psi, stored at position k
//             in the bit-reversed order the CT unit produces (O(N^2)).
//   sdd_ref:  signed base-2^7 digits of a coefficient centred in
//             (-Q/2, Q/2], each mapped to [0, Q).
//   intt_ref: the inverse of ntt_ref, from the same definition.
//   mont_ref: a * b * R^-1 mod Q computed with the modular inverse of R.
package tb_ref_pkg;
  import fhew_pkg::*;

  typedef coef_t poly_t [N];

  function automatic void ntt_ref(input poly_t x, output poly_t X);
    logic [63:0] pw [2*N];
    pw[0] = 64'd1;
    for (int i = 1; i < 2*N; i++) pw[i] = mulmod(pw[i-1], PSI);
    for (int k = 0; k < N; k++) begin
      logic [63:0] acc;
      int unsigned e, step;
      acc  = 0;
      step = (2 * int'(brv(pos_t'(k))) + 1);
      e    = 0;
      for (int i = 0; i < N; i++) begin
        acc = (acc + mulmod(64'(x[i]), pw[e])) % Q;
        e = (e + step) % (2*N);
      end
      X[k] = coef_t'(acc);
    end
  endfunction

  // inverse of ntt_ref: x_i = N^-1 * sum_k X[k] * psi^-((2*brv(k)+1)*i)
  function automatic void intt_ref(input poly_t X, output poly_t x);
    logic [63:0] pw [2*N];
    logic [63:0] ninv, pinv;
    ninv = invmod(64'(N));
    pinv = invmod(PSI);
    pw[0] = 64'd1;
    for (int i = 1; i < 2*N; i++) pw[i] = mulmod(pw[i-1], pinv);
    for (int i = 0; i < N; i++) begin
      logic [63:0] acc;
      acc = 0;
      for (int k = 0; k < N; k++)
        acc = (acc + mulmod(64'(X[k]), pw[((2 * int'(brv(pos_t'(k))) + 1) * i) % (2*N)])) % Q;
      x[i] = coef_t'(mulmod(acc, ninv));
    end
  endfunction

  function automatic coef_t mont_ref(coef_t a, coef_t b);
    logic [63:0] rinv;
    rinv = invmod(R_MODQ);
    return coef_t'(mulmod(mulmod(64'(a), 64'(b)), rinv));
  endfunction

  // digit l (0..DG-1) of coefficient c, as a residue mod Q
  function automatic coef_t sdd_ref(coef_t c, int l);
    longint d, r;
    d = (64'(c) < (Q >> 1)) ? longint'(c) : longint'(c) - longint'(Q);
    r = 0;
    for (int k = 0; k <= l; k++) begin
      r = d % 128;                       // truncating remainder
      if (r >= 64)       r = r - 128;
      else if (r < -64)  r = r + 128;
      d = (d - r) / 128;
    end
    return coef_t'((r < 0) ? r + longint'(Q) : r);
  endfunction
endpackage
