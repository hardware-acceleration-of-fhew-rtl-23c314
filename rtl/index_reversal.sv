// index_reversal: index bit-reversal between a 32-lane coefficient stream and
// the 64 BRAMs of the GS INTT, with the final INTT scaling folded in.
//
// A polynomial moves as BEATS = 32 beats of LANES = 32 coefficients; lane p
// of beat c carries stream index i = 32*c + p.
//   Load:   beat c is written to BRAM positions brv(i). The 32 positions of a
//           beat fall in distinct banks (see fhew_pkg), so one beat is
//           written per cycle and a whole polynomial is reordered in 32
//           cycles.
//   Unload: after ul_start, beat c reads positions brv(i) (one cycle, BRAM
//           read latency), and each coefficient is multiplied by
//           N^-1 * psi^-i (Montgomery form, one mont_mul per lane), so the
//           stream leaves in natural order, already scaled, 1 + MUL_LAT
//           cycles after each read. ul_start is ignored while an unload is
//           running.
// The lane outputs go to a bank_xbar. Doing the reversal on the way into
// and out of the memory, and scaling by N^-1 * psi^-i rather than only N^-1
// (the twisting factor of the negacyclic transform), are this design's
// choices.
module index_reversal
  import fhew_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // load stream
  input  logic                ld_valid,
  input  lanes_t              ld_data,
  output logic                ld_last,      // current beat is the 32nd
  output logic  [LANES-1:0]   wr_lane_en,
  output pos_t  [LANES-1:0]   wr_lane_pos,
  output lanes_t              wr_lane_data,
  // unload stream
  input  logic                ul_start,
  output logic                ul_busy,
  output logic  [LANES-1:0]   rd_lane_en,
  output pos_t  [LANES-1:0]   rd_lane_pos,
  input  lanes_t              rd_lane_data,
  output logic                out_valid,
  output lanes_t              out_data
);
  localparam int unsigned CW = $clog2(BEATS);

  logic [CW-1:0] ld_beat, ul_beat, ul_beat_q;
  logic          ul_run, ul_rd_q;
  logic [MUL_LAT-1:0] vpipe;

  // ---- load ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ld_beat <= '0;
    else if (ld_valid) ld_beat <= ld_beat + 1'b1;
  end
  assign ld_last = ld_valid && (ld_beat == CW'(BEATS - 1));

  always_comb begin
    for (int p = 0; p < LANES; p++) begin
      wr_lane_en[p]   = ld_valid;
      wr_lane_pos[p]  = brv(pos_t'({ld_beat, 5'(p)}));
      wr_lane_data[p] = ld_data[p];
    end
  end

  // ---- unload ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ul_run  <= 1'b0;
      ul_beat <= '0;
    end else if (ul_run) begin
      ul_beat <= ul_beat + 1'b1;
      if (ul_beat == CW'(BEATS - 1)) ul_run <= 1'b0;
    end else if (ul_start) begin
      ul_run  <= 1'b1;
      ul_beat <= '0;
    end
  end
  assign ul_busy = ul_run || ul_rd_q || (|vpipe);

  always_comb begin
    for (int p = 0; p < LANES; p++) begin
      rd_lane_en[p]  = ul_run;
      rd_lane_pos[p] = brv(pos_t'({ul_beat, 5'(p)}));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ul_rd_q <= 1'b0;
      vpipe   <= '0;
    end else begin
      ul_rd_q <= ul_run;
      vpipe   <= {vpipe[MUL_LAT-2:0], ul_rd_q};
    end
  end
  always_ff @(posedge clk) ul_beat_q <= ul_beat;
  assign out_valid = vpipe[MUL_LAT-1];

  // per-lane scale ROM: entry c of lane p holds N^-1 * psi^-(32c+p) * R
  for (genvar p = 0; p < LANES; p++) begin : g_lane
    localparam coef_t [BEATS-1:0] SCALE = intt_scale_rom(p);

    mont_mul u_scale (
      .clk,
      .a (rd_lane_data[p]),
      .b (SCALE[ul_beat_q]),
      .p (out_data[p])
    );
  end
endmodule
