// acc_add: the ADD block of the RGSW accumulator. It sums, lane by lane
// and modulo Q, the beats that the NCT = 4 CT NTT units stream out
// together, giving one beat of the new accumulator polynomial.
//
// Two-level adder tree with a register after each level: out_data and
// out_valid (and the column tag out_col) follow in_valid by two cycles; one
// beat per cycle. The tree and its registers are this design's choice; the
// document gives only the addition of the four CT results.
module acc_add
  import fhew_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_col,
  input  lanes_t in_data [NCT],
  output logic   out_valid,
  output logic   out_col,
  output lanes_t out_data
);
  lanes_t s01, s23;
  logic   v1, c1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    c1      <= in_col;
    out_col <= c1;
    for (int p = 0; p < LANES; p++) begin
      s01[p]      <= mod_add(in_data[0][p], in_data[1][p]);
      s23[p]      <= mod_add(in_data[2][p], in_data[3][p]);
      out_data[p] <= mod_add(s01[p], s23[p]);
    end
  end
endmodule
