// gs_intt: Gentleman-Sande inverse NTT of one 1024-coefficient polynomial in
// R_Q = Z_Q[x]/(x^N + 1), on LANES = 32 processing elements sharing the 64
// data BRAMs of one poly_ram.
//
// Operation, one polynomial at a time:
//   LOAD    32 beats of 32 coefficients arrive on in_data (in_valid while
//           in_ready). Beat c lane p is NTT-domain coefficient 32c+p in the
//           order the CT NTT (ct_ntt) produces; index_reversal stores it at
//           the bit-reversed position, so the transform input is in natural
//           order.
//   RUN     10 stages of radix-2 decimation-in-frequency butterflies,
//           distance 512 down to 1, with omega^-1 = psi^-2 twiddles. In each
//           stage, cycle c (0..15) gives butterfly 32c+p to PE p; the 64
//           operands are read through a bank_xbar (conflict-free map in
//           fhew_pkg), and results are written back in place BF_LAT+1
//           cycles later. Each PE has its own twiddle ROM of 160 words. The
//           unit waits for the last write of a stage before the next stage.
//   UNLOAD  once out_ready is high, 32 beats leave on out_data (out_valid),
//           in natural coefficient order, read back through the index
//           reversal and multiplied by N^-1 * psi^-i.
// Timing: 32 load cycles, 10 * (16 + 5) = 210 run cycles, then 32 beats that
// start 1 + MUL_LAT cycles after unloading begins. No back-pressure on
// out_data; holding flags cycles in which a finished result waits for
// out_ready.
// The document fixes 32 PEs, 64 BRAMs, the GS datapath and the bit reversal
// at both ends with the 1/N scaling; the memory map, the cyclic
// formulation with psi^-i folded into the final scaling, and the stage
// drain are this design's choices.
module gs_intt
  import fhew_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  lanes_t  in_data,
  input  logic    out_ready,
  output logic    out_valid,
  output lanes_t  out_data,
  output logic    busy,
  output logic    holding      // result ready, held back by out_ready
);
  localparam int unsigned NL   = 2 * LANES;
  localparam int unsigned WLAT = 1 + BF_LAT;      // read issue -> write

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_WAIT, S_UNLOAD} state_t;
  state_t state;

  logic [3:0] stage;                   // log2 of butterfly distance
  logic [3:0] cyc;                     // cycle within a stage
  logic [2:0] drain;
  logic       issue;

  // write-back pipeline of (valid, stage, cycle)
  logic [WLAT-1:0] wv;
  logic [3:0]      ws [WLAT];
  logic [3:0]      wc [WLAT];

  // ---- control ----
  logic ld_last, ul_busy, ul_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      stage <= 4'(LOGN - 1);
      cyc   <= '0;
      drain <= '0;
    end else begin
      case (state)
        S_LOAD: if (ld_last) begin
          state <= S_RUN;
          stage <= 4'(LOGN - 1);
          cyc   <= '0;
          drain <= '0;
        end
        S_RUN: begin
          if (issue) begin
            cyc <= cyc + 1'b1;
            if (cyc == 4'(BFLY_CYC - 1)) drain <= 3'(WLAT);
          end else if (drain != 0) begin
            drain <= drain - 1'b1;
            if (drain == 3'd1) begin
              if (stage == 0) state <= S_WAIT;
              else            stage <= stage - 1'b1;
            end
          end
        end
        S_WAIT:   if (out_ready) state <= S_UNLOAD;
        S_UNLOAD: if (!ul_busy && !ul_start) state <= S_LOAD;
        default:  state <= S_LOAD;
      endcase
    end
  end

  assign issue    = (state == S_RUN) && (drain == 0);
  assign in_ready = (state == S_LOAD);
  assign ul_start = (state == S_WAIT) && out_ready;
  assign busy     = (state != S_LOAD);
  assign holding  = (state == S_WAIT) && !out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wv <= '0;
    else        wv <= {wv[WLAT-2:0], issue};
  end
  always_ff @(posedge clk) begin
    ws[0] <= stage;
    wc[0] <= cyc;
    for (int i = 1; i < WLAT; i++) begin
      ws[i] <= ws[i-1];
      wc[i] <= wc[i-1];
    end
  end

  // ---- memory, crossbar, index reversal ----
  logic  [NBANK-1:0] m_rd_en, m_wr_en;
  addr_t [NBANK-1:0] m_rd_addr, m_wr_addr;
  coef_t [NBANK-1:0] m_rd_data, m_wr_data;

  logic  [NL-1:0] x_rd_en, x_wr_en;
  pos_t  [NL-1:0] x_rd_pos, x_wr_pos;
  coef_t [NL-1:0] x_rd_data, x_wr_data;

  logic  [LANES-1:0] ir_wr_en, ir_rd_en;
  pos_t  [LANES-1:0] ir_wr_pos, ir_rd_pos;
  lanes_t            ir_wr_data, ir_rd_data;

  poly_ram u_ram (
    .clk, .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_data(m_rd_data),
    .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_data(m_wr_data)
  );

  bank_xbar #(.NL(NL)) u_xbar (
    .clk, .rst_n,
    .rd_lane_en(x_rd_en), .rd_lane_pos(x_rd_pos), .rd_lane_data(x_rd_data),
    .wr_lane_en(x_wr_en), .wr_lane_pos(x_wr_pos), .wr_lane_data(x_wr_data),
    .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_data(m_rd_data),
    .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_data(m_wr_data)
  );

  index_reversal u_irev (
    .clk, .rst_n,
    .ld_valid(in_valid && in_ready), .ld_data(in_data), .ld_last,
    .wr_lane_en(ir_wr_en), .wr_lane_pos(ir_wr_pos), .wr_lane_data(ir_wr_data),
    .ul_start, .ul_busy,
    .rd_lane_en(ir_rd_en), .rd_lane_pos(ir_rd_pos), .rd_lane_data(ir_rd_data),
    .out_valid, .out_data
  );

  // ---- processing elements ----
  coef_t [LANES-1:0] bf_e, bf_o;

  for (genvar p = 0; p < LANES; p++) begin : g_pe
    localparam tw_rom_t TW = tw_rom(p, 1'b1);
    coef_t tw_q;
    always_ff @(posedge clk) tw_q <= TW[{stage, cyc}];

    gs_butterfly u_bf (
      .clk,
      .a(x_rd_data[2*p]), .b(x_rd_data[2*p+1]), .w(tw_q),
      .e(bf_e[p]), .o(bf_o[p])
    );
    assign ir_rd_data[p] = x_rd_data[p];
  end

  always_comb begin
    x_rd_en   = '0;
    x_rd_pos  = '0;
    x_wr_en   = '0;
    x_wr_pos  = '0;
    x_wr_data = '0;
    for (int p = 0; p < LANES; p++) begin
      if (state == S_RUN) begin
        x_rd_en [2*p]   = issue;
        x_rd_en [2*p+1] = issue;
        x_rd_pos[2*p]   = bfly_pos({cyc, 5'(p)}, int'(stage));
        x_rd_pos[2*p+1] = bfly_pos({cyc, 5'(p)}, int'(stage)) | (pos_t'(1) << stage);
      end else begin
        x_rd_en [p] = ir_rd_en[p];
        x_rd_pos[p] = ir_rd_pos[p];
      end
      if (wv[WLAT-1]) begin
        x_wr_en  [2*p]   = 1'b1;
        x_wr_en  [2*p+1] = 1'b1;
        x_wr_pos [2*p]   = bfly_pos({wc[WLAT-1], 5'(p)}, int'(ws[WLAT-1]));
        x_wr_pos [2*p+1] = bfly_pos({wc[WLAT-1], 5'(p)}, int'(ws[WLAT-1]))
                           | (pos_t'(1) << ws[WLAT-1]);
        x_wr_data[2*p]   = bf_e[p];
        x_wr_data[2*p+1] = bf_o[p];
      end else begin
        x_wr_en  [p] = ir_wr_en[p];
        x_wr_pos [p] = ir_wr_pos[p];
        x_wr_data[p] = ir_wr_data[p];
      end
    end
  end
endmodule
