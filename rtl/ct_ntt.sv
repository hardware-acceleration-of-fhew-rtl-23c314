// ct_ntt: Cooley-Tukey forward NTT of one digit polynomial, followed by the
// multiply-accumulate with the bootstrapping key, on LANES = 32 processing
// elements.
//
// The unit owns three 64-BRAM polynomial stores: the data store for the NTT
// and two extension stores, one per output polynomial of the RGSW product
// (column 0 and column 1), that keep the running key products.
// Operation:
//   LOAD  32 beats on in_data (in_valid while in_ready), natural coefficient
//         order, beat c lane p = coefficient 32c+p. in_half, sampled with
//         the last beat, says which half of the accumulation this digit
//         belongs to (0 = digit of polynomial a, 1 = digit of polynomial b).
//   RUN   10 stages of decimation-in-time butterflies (distance 512 down to
//         1, merged psi twiddles from a 160-word ROM per PE), same schedule
//         and 5-cycle write-back as gs_intt. The result is in bit-reversed
//         evaluation order.
//   MAC   64 cycles: for column col = 0, 1 and beat c = 0..31, PE p takes
//         position 32c+p of the NTT result D, the key coefficient K from
//         key_data and the stored partial sum S of that column, and writes
//         S + D*K back (S = 0 in half 0). The butterfly datapath does this as
//         Even + Odd * Factor. The key is requested with key_req / key_col /
//         key_beat / key_half and must be on key_data one cycle later, in
//         Montgomery form.
//   OUT   after half 1, the unit holds the two column results until
//         out_start; it then streams 64 beats (col 0 beats 0..31, then col 1),
//         out_valid one cycle after each read, and returns to LOAD.
// The document gives the 32 CT PEs, the key product folded into the CT
// datapath and the BRAMs extended to hold the first half's product; the
// handshakes, beat order and key timing are this design's choices.
module ct_ntt
  import fhew_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  lanes_t  in_data,
  input  logic    in_half,
  output logic    key_req,
  output logic    key_col,
  output logic [4:0] key_beat,
  output logic    key_half,
  input  lanes_t  key_data,
  output logic    result_ready,    // both columns hold a full result
  input  logic    out_start,
  output logic    out_valid,
  output logic    out_col,
  output lanes_t  out_data
);
  localparam int unsigned NL   = 2 * LANES;
  localparam int unsigned WLAT = 1 + BF_LAT;

  typedef enum logic [2:0] {S_LOAD, S_RUN, S_MAC, S_MAC_DRAIN, S_HOLD, S_OUT} state_t;
  state_t state;

  logic [4:0] ld_beat;
  logic       half;
  logic [3:0] stage, cyc;
  logic [2:0] drain;
  logic       issue;
  logic [5:0] mcnt;              // MAC / OUT counter: {col, beat}
  logic       out_rd;

  // ---- control ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      ld_beat <= '0;
      half    <= 1'b0;
      stage   <= 4'(LOGN - 1);
      cyc     <= '0;
      drain   <= '0;
      mcnt    <= '0;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          ld_beat <= ld_beat + 1'b1;
          if (ld_beat == 5'(BEATS - 1)) begin
            state <= S_RUN;
            half  <= in_half;
            stage <= 4'(LOGN - 1);
            cyc   <= '0;
            drain <= '0;
          end
        end
        S_RUN: begin
          if (issue) begin
            cyc <= cyc + 1'b1;
            if (cyc == 4'(BFLY_CYC - 1)) drain <= 3'(WLAT);
          end else if (drain != 0) begin
            drain <= drain - 1'b1;
            if (drain == 3'd1) begin
              if (stage == 0) begin
                state <= S_MAC;
                mcnt  <= '0;
              end else stage <= stage - 1'b1;
            end
          end
        end
        S_MAC: begin
          mcnt <= mcnt + 1'b1;
          if (mcnt == 6'd63) begin
            state <= S_MAC_DRAIN;
            drain <= 3'(WLAT);
          end
        end
        S_MAC_DRAIN: begin
          drain <= drain - 1'b1;
          if (drain == 3'd1) state <= half ? S_HOLD : S_LOAD;
        end
        S_HOLD: if (out_start) begin
          state <= S_OUT;
          mcnt  <= '0;
        end
        S_OUT: begin
          mcnt <= mcnt + 1'b1;
          if (mcnt == 6'd63) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assign issue        = (state == S_RUN) && (drain == 0);
  assign in_ready     = (state == S_LOAD);
  assign result_ready = (state == S_HOLD);
  assign out_rd       = (state == S_OUT);

  assign key_req  = (state == S_MAC);
  assign key_col  = mcnt[5];
  assign key_beat = mcnt[4:0];
  assign key_half = half;

  // write-back pipeline: kind (0 = butterfly, 1 = MAC), stage, cycle, col/beat
  logic [WLAT-1:0] wv, wm;
  logic [3:0]      ws [WLAT];
  logic [3:0]      wc [WLAT];
  logic [5:0]      wk [WLAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wv <= '0;
      wm <= '0;
    end else begin
      wv <= {wv[WLAT-2:0], issue};
      wm <= {wm[WLAT-2:0], key_req};
    end
  end
  always_ff @(posedge clk) begin
    ws[0] <= stage;
    wc[0] <= cyc;
    wk[0] <= mcnt;
    for (int i = 1; i < WLAT; i++) begin
      ws[i] <= ws[i-1];
      wc[i] <= wc[i-1];
      wk[i] <= wk[i-1];
    end
  end

  logic mac_q, half_q, col_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_q     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      mac_q     <= key_req;
      out_valid <= out_rd;
    end
  end
  always_ff @(posedge clk) begin
    half_q  <= half;
    col_q   <= mcnt[5];
    out_col <= mcnt[5];
  end

  // ---- data store ----
  logic  [NBANK-1:0] d_rd_en, d_wr_en;
  addr_t [NBANK-1:0] d_rd_addr, d_wr_addr;
  coef_t [NBANK-1:0] d_rd_data, d_wr_data;
  logic  [NL-1:0]    x_rd_en, x_wr_en;
  pos_t  [NL-1:0]    x_rd_pos, x_wr_pos;
  coef_t [NL-1:0]    x_rd_data, x_wr_data;

  poly_ram u_data (
    .clk, .rd_en(d_rd_en), .rd_addr(d_rd_addr), .rd_data(d_rd_data),
    .wr_en(d_wr_en), .wr_addr(d_wr_addr), .wr_data(d_wr_data)
  );
  bank_xbar #(.NL(NL)) u_dxbar (
    .clk, .rst_n,
    .rd_lane_en(x_rd_en), .rd_lane_pos(x_rd_pos), .rd_lane_data(x_rd_data),
    .wr_lane_en(x_wr_en), .wr_lane_pos(x_wr_pos), .wr_lane_data(x_wr_data),
    .rd_en(d_rd_en), .rd_addr(d_rd_addr), .rd_data(d_rd_data),
    .wr_en(d_wr_en), .wr_addr(d_wr_addr), .wr_data(d_wr_data)
  );

  // ---- extension stores, one per column ----
  logic  [LANES-1:0] e_rd_en [2];
  logic  [LANES-1:0] e_wr_en [2];
  pos_t  [LANES-1:0] e_rd_pos, e_wr_pos;
  coef_t [LANES-1:0] e_rd_data [2];
  coef_t [LANES-1:0] e_wr_data;

  for (genvar k = 0; k < 2; k++) begin : g_ext
    logic  [NBANK-1:0] rd_en, wr_en;
    addr_t [NBANK-1:0] rd_addr, wr_addr;
    coef_t [NBANK-1:0] rd_data, wr_data;
    poly_ram u_ram (
      .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
    );
    bank_xbar #(.NL(LANES)) u_xbar (
      .clk, .rst_n,
      .rd_lane_en(e_rd_en[k]), .rd_lane_pos(e_rd_pos), .rd_lane_data(e_rd_data[k]),
      .wr_lane_en(e_wr_en[k]), .wr_lane_pos(e_wr_pos), .wr_lane_data(e_wr_data),
      .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
    );
  end

  // ---- processing elements ----
  coef_t [LANES-1:0] bf_e, bf_o;

  for (genvar p = 0; p < LANES; p++) begin : g_pe
    localparam tw_rom_t TW = tw_rom(p, 1'b0);
    coef_t tw_q;
    coef_t a_in, b_in, w_in;
    always_ff @(posedge clk) tw_q <= TW[{stage, cyc}];

    always_comb begin
      if (mac_q) begin
        a_in = half_q ? e_rd_data[col_q][p] : '0;
        b_in = x_rd_data[p];
        w_in = key_data[p];
      end else begin
        a_in = x_rd_data[2*p];
        b_in = x_rd_data[2*p+1];
        w_in = tw_q;
      end
    end

    ct_butterfly u_bf (
      .clk, .a(a_in), .b(b_in), .w(w_in), .e(bf_e[p]), .o(bf_o[p])
    );
    assign out_data[p] = e_rd_data[out_col][p];
  end

  always_comb begin
    x_rd_en   = '0;
    x_rd_pos  = '0;
    x_wr_en   = '0;
    x_wr_pos  = '0;
    x_wr_data = '0;
    e_rd_en   = '{default: '0};
    e_wr_en   = '{default: '0};
    e_rd_pos  = '0;
    e_wr_pos  = '0;
    e_wr_data = '0;
    for (int p = 0; p < LANES; p++) begin
      // data store reads
      if (state == S_RUN) begin
        x_rd_en [2*p]   = issue;
        x_rd_en [2*p+1] = issue;
        x_rd_pos[2*p]   = bfly_pos({cyc, 5'(p)}, int'(stage));
        x_rd_pos[2*p+1] = bfly_pos({cyc, 5'(p)}, int'(stage)) | (pos_t'(1) << stage);
      end else if (state == S_MAC) begin
        x_rd_en [p] = 1'b1;
        x_rd_pos[p] = pos_t'({mcnt[4:0], 5'(p)});
      end
      // data store writes: load beats or butterfly results
      if (wv[WLAT-1]) begin
        x_wr_en  [2*p]   = 1'b1;
        x_wr_en  [2*p+1] = 1'b1;
        x_wr_pos [2*p]   = bfly_pos({wc[WLAT-1], 5'(p)}, int'(ws[WLAT-1]));
        x_wr_pos [2*p+1] = bfly_pos({wc[WLAT-1], 5'(p)}, int'(ws[WLAT-1]))
                           | (pos_t'(1) << ws[WLAT-1]);
        x_wr_data[2*p]   = bf_e[p];
        x_wr_data[2*p+1] = bf_o[p];
      end else if (state == S_LOAD) begin
        x_wr_en  [p] = in_valid;
        x_wr_pos [p] = pos_t'({ld_beat, 5'(p)});
        x_wr_data[p] = in_data[p];
      end
      // extension stores: partial-sum reads in MAC (half 1), result reads in OUT
      if (state == S_MAC) begin
        e_rd_en[mcnt[5]][p] = half;
        e_rd_pos[p]         = pos_t'({mcnt[4:0], 5'(p)});
      end else if (out_rd) begin
        e_rd_en[mcnt[5]][p] = 1'b1;
        e_rd_pos[p]         = pos_t'({mcnt[4:0], 5'(p)});
      end
      if (wm[WLAT-1]) begin
        e_wr_en[wk[WLAT-1][5]][p] = 1'b1;
        e_wr_pos[p]               = pos_t'({wk[WLAT-1][4:0], 5'(p)});
        e_wr_data[p]              = bf_e[p];
      end
    end
  end
endmodule
