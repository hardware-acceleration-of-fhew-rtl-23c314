// fhew_pkg: constants, types and helper functions shared by the FHEW RGSW
// accumulator datapath.
//
// Ring and modulus follow the STD128 parameter set: polynomials of N = 1024
// coefficients, a 27-bit NTT modulus Q, gadget base B_g = 128 and d_g = 4
// digits, processed by 32 butterfly processing elements (PEs) that share 64
// single-read/single-write BRAMs of 16 words each.
//
// Own choices (the STD128 set only fixes the width of Q):
//   * Q = 134215681 = 2^27 - 2047, a prime with Q = 1 mod 2N, so a primitive
//     2N-th root of unity PSI exists.  PSI = 7^((Q-1)/2048) mod Q = 4073518.
//   * The modular multiplier is a Montgomery multiplier with R = 2^27: it
//     returns a*b*R^-1 mod Q.  Every constant operand (twiddles, scale
//     factors, bootstrapping key) is therefore stored premultiplied by R.
//   * Coefficient position j (0..1023) of a polynomial lives in BRAM
//     bank_of(j) at word addr_of(j):
//         bank[4:0] = j[4:0] ^ j[9:5],  bank[5] = ^j[9:5],  addr = j[9:6].
//     With butterfly b = 32*c + p handled by PE p in cycle c of a stage, the
//     64 positions touched in a cycle fall in 64 distinct banks for every
//     stage; 32 consecutive positions, and 32 positions in bit-reversed
//     order, also fall in distinct banks.  This is the conflict-free address
//     schedule.
package fhew_pkg;

  localparam int unsigned N       = 1024;   // ring size
  localparam int unsigned LOGN    = 10;
  localparam int unsigned LANES   = 32;     // processing elements
  localparam int unsigned NBANK   = 64;     // data BRAMs per polynomial
  localparam int unsigned DEPTH   = N / NBANK;
  localparam int unsigned AW      = 4;      // log2(DEPTH)
  localparam int unsigned BW      = 6;      // log2(NBANK)
  localparam int unsigned QW      = 27;     // log2(Q)
  localparam int unsigned BEATS   = N / LANES;        // 32 stream beats per polynomial
  localparam int unsigned BFLY_CYC = N / 2 / LANES;   // 16 cycles per NTT stage
  localparam int unsigned BG_BITS = 7;      // B_g = 128
  localparam int unsigned DG      = 4;      // digits per coefficient
  localparam int unsigned NCT     = DG;     // CT NTT units, one per digit
  localparam int unsigned MUL_LAT = 3;      // Montgomery multiplier latency
  localparam int unsigned BF_LAT  = MUL_LAT + 1; // butterfly latency

  localparam logic [63:0] Q    = 64'd134215681;
  localparam logic [63:0] PSI  = 64'd4073518;
  localparam logic [63:0] QP   = 64'd130021375;   // -Q^-1 mod 2^27
  localparam logic [63:0] R_MODQ = (64'd1 << QW) % Q;

  typedef logic [QW-1:0]          coef_t;
  typedef coef_t [LANES-1:0]      lanes_t;        // one stream beat
  typedef logic [AW-1:0]          addr_t;
  typedef logic [BW-1:0]          bank_t;
  typedef logic [LOGN-1:0]        pos_t;

  // ---- modular arithmetic on values in [0, Q) ----
  function automatic coef_t mod_add(coef_t a, coef_t b);
    logic [QW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= Q[QW:0]) s = s - Q[QW:0];
    return s[QW-1:0];
  endfunction

  function automatic coef_t mod_sub(coef_t a, coef_t b);
    logic [QW:0] d;
    d = {1'b0, a} - {1'b0, b};
    if (a < b) d = d + Q[QW:0];
    return d[QW-1:0];
  endfunction

  // Plain modular product, for constants and testbench references.
  function automatic logic [63:0] mulmod(logic [63:0] a, logic [63:0] b);
    return (a * b) % Q;
  endfunction

  function automatic logic [63:0] powmod(logic [63:0] base, int unsigned e);
    logic [63:0] r, x;
    r = 64'd1;
    x = base % Q;
    for (int i = 0; i < 32; i++) begin
      if (e[i]) r = mulmod(r, x);
      x = mulmod(x, x);
    end
    return r;
  endfunction

  function automatic logic [63:0] invmod(logic [63:0] a);
    return powmod(a, 32'(Q - 64'd2));
  endfunction

  // x * R mod Q: the Montgomery form used for all stored constants.
  function automatic coef_t to_mont(logic [63:0] x);
    return coef_t'(mulmod(x % Q, R_MODQ));
  endfunction

  function automatic pos_t brv(pos_t x);
    pos_t r;
    for (int i = 0; i < LOGN; i++) r[i] = x[LOGN-1-i];
    return r;
  endfunction

  // ---- conflict-free memory map ----
  function automatic bank_t bank_of(pos_t j);
    return {^j[9:5], j[4:0] ^ j[9:5]};
  endfunction

  function automatic addr_t addr_of(pos_t j);
    return j[9:6];
  endfunction

  // Position of the upper input of butterfly b (0..511) in the stage whose
  // butterfly distance is 2^s: insert a 0 at bit s.
  function automatic pos_t bfly_pos(logic [LOGN-2:0] b, int unsigned s);
    logic [LOGN-1:0] w, lowmask;
    w = {1'b0, b};
    lowmask = (LOGN'(1) << s) - LOGN'(1);
    return ((w & ~lowmask) << 1) | (w & lowmask);
  endfunction

  // ---- twiddle factors (Montgomery form) ----
  // CT NTT, stage with distance 2^s, butterfly b:
  //   psi^brv(2^(9-s) + (b >> s))
  function automatic coef_t ct_twiddle(int unsigned s, int unsigned b);
    int unsigned k;
    k = (1 << (LOGN - 1 - s)) + (b >> s);
    return to_mont(powmod(PSI, int'(brv(pos_t'(k)))));
  endfunction

  // GS inverse (cyclic, decimation in frequency), distance 2^s, butterfly b:
  //   omega^-((b mod 2^s) * 2^(9-s)),  omega = PSI^2
  function automatic coef_t gs_twiddle(int unsigned s, int unsigned b);
    int unsigned e;
    e = (b & ((1 << s) - 1)) << (LOGN - 1 - s);
    return to_mont(powmod(invmod(mulmod(PSI, PSI)), e));
  endfunction

  // Final INTT scale factor for output coefficient i: N^-1 * psi^-i.
  function automatic coef_t intt_scale(int unsigned i);
    return to_mont(mulmod(invmod(64'(N)), powmod(invmod(PSI), i)));
  endfunction

  typedef coef_t [BEATS-1:0]    beat_rom_t;      // one entry per stream beat
  typedef coef_t [N/2/LANES*LOGN-1:0] tw_rom_t; // one entry per (stage, cycle)

  // Scale factors seen by lane p, one per beat c: N^-1 * psi^-(32c+p).
  function automatic beat_rom_t intt_scale_rom(int unsigned p);
    beat_rom_t r;
    for (int c = 0; c < BEATS; c++) r[c] = intt_scale(c * LANES + p);
    return r;
  endfunction

  // Twiddle ROM of PE p, entry s*16 + c: factor of butterfly 32c+p at the
  // stage with distance 2^s. inverse selects the GS (INTT) factors.
  function automatic tw_rom_t tw_rom(int unsigned p, bit inverse);
    tw_rom_t r;
    for (int s = 0; s < LOGN; s++)
      for (int c = 0; c < BFLY_CYC; c++)
        r[s*BFLY_CYC + c] = inverse ? gs_twiddle(s, c * LANES + p)
                                    : ct_twiddle(s, c * LANES + p);
    return r;
  endfunction

endpackage
