// gs_butterfly: Gentleman-Sande butterfly of one inverse-NTT processing
// element: E = a + b mod Q and O = (a - b) * w * R^-1 mod Q.
//
// Datapath as drawn for the processing element: an adder and a subtractor fed
// by the two data BRAM outputs, the difference multiplied by the twiddle
// factor w (stored in Montgomery form, w * R), the sum delayed to line up with
// the product. Inputs are registered first, so both outputs appear
// BF_LAT = MUL_LAT + 1 = 4 cycles after a, b and w are presented; one
// butterfly is accepted every cycle. The register placement is this design's
// choice.
module gs_butterfly
  import fhew_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  input  coef_t w,
  output coef_t e,
  output coef_t o
);
  coef_t sum_q, dif_q, w_q;
  coef_t sum_d [MUL_LAT];

  always_ff @(posedge clk) begin
    sum_q <= mod_add(a, b);
    dif_q <= mod_sub(a, b);
    w_q   <= w;
    sum_d[0] <= sum_q;
    for (int i = 1; i < MUL_LAT; i++) sum_d[i] <= sum_d[i-1];
  end

  mont_mul u_mul (.clk, .a(dif_q), .b(w_q), .p(o));

  assign e = sum_d[MUL_LAT-1];
endmodule
