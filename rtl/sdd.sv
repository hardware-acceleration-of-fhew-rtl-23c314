// sdd: signed digit decomposition of a 32-coefficient beat into DG = 4
// digits of base B_g = 2^7 = 128.
//
// Each coefficient c in [0, Q) is first centred, d = c if c < floor(Q/2)
// else c - Q. Then, for l = 0..3, the digit r_l is the low 7 bits of d read
// as a signed number in [-64, 63], and d becomes (d - r_l) / 128. The
// digits satisfy sum_l r_l * 128^l = d, so they reconstruct c modulo Q.
// A negative digit leaves as r_l + Q, a residue ready for the NTT.
// One beat per cycle, one register stage: digits[l] is valid with out_valid
// one cycle after in_valid. The procedure follows the signed decomposition
// of the reference software library; the centring threshold and the residue
// form of negative digits are choices of this design.
module sdd
  import fhew_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  lanes_t in_data,
  output logic   out_valid,
  output lanes_t digits [DG]
);
  localparam int unsigned DW = QW + 1;     // signed working width

  function automatic coef_t [DG-1:0] decompose(coef_t c);
    logic signed [DW-1:0]      d;
    logic signed [BG_BITS-1:0] r;
    coef_t [DG-1:0]            out;
    if ({1'b0, c} < DW'(Q >> 1)) d = signed'({1'b0, c});
    else                         d = signed'({1'b0, c}) - signed'(DW'(Q));
    for (int l = 0; l < DG; l++) begin
      r = d[BG_BITS-1:0];
      d = (d - DW'(r)) >>> BG_BITS;
      if (r < 0) out[l] = coef_t'(DW'(r) + DW'(Q));
      else       out[l] = coef_t'(r);
    end
    return out;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < LANES; p++) begin
      coef_t [DG-1:0] dg;
      dg = decompose(in_data[p]);
      for (int l = 0; l < DG; l++) digits[l][p] <= dg[l];
    end
  end
endmodule
