// rgsw_acc_top: one RGSW x RLWE' accumulator step of FHEW bootstrapping.
//
// The accumulator is a pair of polynomials (a, b) of N = 1024 coefficients
// mod Q, held in the NTT domain. One step computes
//     a' = sum_j NTT(dec_j(a)) * K[0][j][0] + sum_j NTT(dec_j(b)) * K[1][j][0]
//     b' = sum_j NTT(dec_j(a)) * K[0][j][1] + sum_j NTT(dec_j(b)) * K[1][j][1]
// where dec_j is digit j (j = 0..3) of the signed base-128 decomposition and
// K is the RGSW bootstrapping-key entry for this step, given in the NTT
// domain and Montgomery form (times R = 2^27). Products are pointwise.
//
// Datapath: in_data -> gs_intt -> sdd -> four ct_ntt units (one per digit)
// -> acc_add -> out_data. Polynomial a passes first (half 0): each CT unit
// transforms its digit, multiplies by the key and keeps both column products
// in its extension BRAMs. Polynomial b follows (half 1) and its products are
// added to the stored ones. acc_add then sums the four units' results.
// The GS INTT may load b while the CT units work on a; it holds its unload
// until all four CT units are ready to load (a stall).
//
// Interfaces (beat = 32 coefficients, lane p of beat c = coefficient 32c+p):
//   in_*    64 beats per step, a then b, in the CT output order; in_ready
//           is the INTT's ready.
//   key_*   per CT unit: key_req with key_col / key_beat / key_half selects
//           the key beat K[key_half][unit][key_col][beat], which must be on
//           key_data one cycle later.
//   out_*   64 beats per step: out_col 0 = a', out_col 1 = b', same order as
//           the input, so out_data can be fed back as the next step's input.
// The structure (GS INTT, SDD, four CT NTTs with key accumulation, ADD)
// follows the document; the key interface timing, the ordering of the key
// rows and the handshakes are this design's own.
module rgsw_acc_top
  import fhew_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  lanes_t           in_data,
  output logic [NCT-1:0]   key_req,
  output logic [NCT-1:0]   key_col,
  output logic [4:0]       key_beat [NCT],
  output logic [NCT-1:0]   key_half,
  input  lanes_t           key_data [NCT],
  output logic             out_valid,
  output logic             out_col,
  output lanes_t           out_data,
  output logic             intt_stall      // INTT result waiting for the CT units
);
  // ---- GS INTT ----
  logic   intt_out_ready, intt_out_valid, intt_holding;
  lanes_t intt_out_data;

  gs_intt u_intt (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_ready(intt_out_ready), .out_valid(intt_out_valid),
    .out_data(intt_out_data), .busy(), .holding(intt_holding)
  );

  // ---- signed digit decomposition ----
  logic   sdd_valid;
  lanes_t digits [DG];

  sdd u_sdd (
    .clk, .rst_n,
    .in_valid(intt_out_valid), .in_data(intt_out_data),
    .out_valid(sdd_valid), .digits
  );

  // half: 0 while polynomial a streams into the CT units, 1 for b
  logic       half;
  logic [4:0] sdd_beat;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half     <= 1'b0;
      sdd_beat <= '0;
    end else if (sdd_valid) begin
      sdd_beat <= sdd_beat + 1'b1;
      if (sdd_beat == 5'(BEATS - 1)) half <= ~half;
    end
  end

  // ---- CT NTT units ----
  logic [NCT-1:0] ct_in_ready, ct_result_ready, ct_out_valid, ct_out_col;
  lanes_t         ct_out_data [NCT];
  logic           out_start;

  for (genvar j = 0; j < NCT; j++) begin : g_ct
    ct_ntt u_ct (
      .clk, .rst_n,
      .in_valid(sdd_valid), .in_ready(ct_in_ready[j]), .in_data(digits[j]),
      .in_half(half),
      .key_req(key_req[j]), .key_col(key_col[j]), .key_beat(key_beat[j]),
      .key_half(key_half[j]), .key_data(key_data[j]),
      .result_ready(ct_result_ready[j]), .out_start,
      .out_valid(ct_out_valid[j]), .out_col(ct_out_col[j]),
      .out_data(ct_out_data[j])
    );
  end

  assign intt_out_ready = &ct_in_ready;
  assign out_start      = &ct_result_ready;
  assign intt_stall     = intt_holding;

  // ---- ADD ----
  acc_add u_add (
    .clk, .rst_n,
    .in_valid(ct_out_valid[0]), .in_col(ct_out_col[0]), .in_data(ct_out_data),
    .out_valid, .out_col, .out_data
  );

  // The four CT units run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               ((ct_out_valid == '0) || (ct_out_valid == '1)) &&
                               (!ct_out_valid[0] || (ct_out_col == '0) || (ct_out_col == '1)))
    else $error("rgsw_acc_top: CT units out of step");
endmodule
