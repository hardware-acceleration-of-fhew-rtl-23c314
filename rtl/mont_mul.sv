// mont_mul: pipelined Montgomery modular multiplier, p = a * b * R^-1 mod Q.
//
// This is the "X" unit of each butterfly. Both inputs must lie in [0, Q).
// Because it divides by R = 2^27, a constant operand (twiddle factor,
// scale factor, bootstrapping key coefficient) must be stored premultiplied
// by R, so that the product comes out in plain form.
//
// Pipeline (MUL_LAT = 3 register stages, one new operand pair per cycle):
//   1. T = a * b                      (54-bit product)
//   2. m = (T mod R) * (-Q^-1) mod R
//   3. u = (T + m * Q) / R, minus Q if u >= Q
// The Montgomery algorithm is this design's choice; the document names only
// the factor R that stored constants carry.
module mont_mul
  import fhew_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  output coef_t p
);
  logic [2*QW-1:0] t1, t2;
  logic [QW-1:0]   m2;
  logic [2*QW:0]   sum3;
  logic [QW:0]     u3;

  always_ff @(posedge clk) begin
    t1 <= {{QW{1'b0}}, a} * {{QW{1'b0}}, b};
  end

  logic [2*QW-1:0] m_full;
  assign m_full = {{QW{1'b0}}, t1[QW-1:0]} * {{QW{1'b0}}, QP[QW-1:0]};

  always_ff @(posedge clk) begin
    t2 <= t1;
    m2 <= m_full[QW-1:0];
  end

  assign sum3 = {1'b0, t2} + ({{(QW+1){1'b0}}, m2} * {{(QW+1){1'b0}}, Q[QW-1:0]});
  assign u3   = sum3[2*QW:QW];

  always_ff @(posedge clk) begin
    if (u3 >= Q[QW:0]) p <= coef_t'(u3 - Q[QW:0]);
    else               p <= u3[QW-1:0];
  end
endmodule
