// ct_butterfly: Cooley-Tukey butterfly of one forward-NTT processing
// element: t = b * w * R^-1, E = a + t, O = a - t (all mod Q).
//
// The same datapath performs the bootstrapping-key multiply-accumulate:
// with a = running partial sum, b = NTT coefficient and w = key coefficient
// (in Montgomery form) the E output is "Even + Odd * Factor". The multiplier
// comes first, then one register stage for the add/subtract, so both
// outputs appear BF_LAT = MUL_LAT + 1 = 4 cycles after the inputs; one
// butterfly is accepted every cycle. Register placement is this design's
// choice.
module ct_butterfly
  import fhew_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  input  coef_t w,
  output coef_t e,
  output coef_t o
);
  coef_t a_d [MUL_LAT];
  coef_t t;

  always_ff @(posedge clk) begin
    a_d[0] <= a;
    for (int i = 1; i < MUL_LAT; i++) a_d[i] <= a_d[i-1];
  end

  mont_mul u_mul (.clk, .a(b), .b(w), .p(t));

  always_ff @(posedge clk) begin
    e <= mod_add(a_d[MUL_LAT-1], t);
    o <= mod_sub(a_d[MUL_LAT-1], t);
  end
endmodule
