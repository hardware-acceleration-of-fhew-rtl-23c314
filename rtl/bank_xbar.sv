// bank_xbar: crossbar between NL coefficient lanes and the NBANK = 64 BRAMs
// of one poly_ram.
//
// Every lane names the coefficient position it wants to read or write; the
// crossbar sends the request to bank fhew_pkg::bank_of(pos), word
// addr_of(pos). Read data come back on the requesting lane one cycle later,
// in step with the synchronous BRAM read. The address schedule of the NTT
// units guarantees that the enabled lanes of one direction hit distinct
// banks in every cycle; an assertion checks this outside reset (rst_n is
// used for nothing else). The crossbar is
// combinational apart from the registered read-return select.
module bank_xbar
  import fhew_pkg::*;
#(
  parameter int unsigned NL = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,        // only gates the assertions
  // lane side
  input  logic  [NL-1:0]        rd_lane_en,
  input  pos_t  [NL-1:0]        rd_lane_pos,
  output coef_t [NL-1:0]        rd_lane_data,
  input  logic  [NL-1:0]        wr_lane_en,
  input  pos_t  [NL-1:0]        wr_lane_pos,
  input  coef_t [NL-1:0]        wr_lane_data,
  // bank side (to poly_ram)
  output logic  [NBANK-1:0]     rd_en,
  output addr_t [NBANK-1:0]     rd_addr,
  input  coef_t [NBANK-1:0]     rd_data,
  output logic  [NBANK-1:0]     wr_en,
  output addr_t [NBANK-1:0]     wr_addr,
  output coef_t [NBANK-1:0]     wr_data
);
  bank_t [NL-1:0] rd_bank_q;

  always_comb begin
    rd_en   = '0;
    rd_addr = '0;
    wr_en   = '0;
    wr_addr = '0;
    wr_data = '0;
    for (int l = 0; l < NL; l++) begin
      if (rd_lane_en[l]) begin
        rd_en  [bank_of(rd_lane_pos[l])] = 1'b1;
        rd_addr[bank_of(rd_lane_pos[l])] = addr_of(rd_lane_pos[l]);
      end
      if (wr_lane_en[l]) begin
        wr_en  [bank_of(wr_lane_pos[l])] = 1'b1;
        wr_addr[bank_of(wr_lane_pos[l])] = addr_of(wr_lane_pos[l]);
        wr_data[bank_of(wr_lane_pos[l])] = wr_lane_data[l];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < NL; l++) rd_bank_q[l] <= bank_of(rd_lane_pos[l]);
  end

  always_comb begin
    for (int l = 0; l < NL; l++) rd_lane_data[l] = rd_data[rd_bank_q[l]];
  end

  // Conflict-free schedule: no two enabled lanes of one direction share a bank.
  function automatic int unsigned conflicts(logic [NL-1:0] en, pos_t [NL-1:0] pos);
    logic [NBANK-1:0] used;
    int unsigned n;
    used = '0;
    n = 0;
    for (int l = 0; l < NL; l++) begin
      if (en[l]) begin
        if (used[bank_of(pos[l])]) n++;
        used[bank_of(pos[l])] = 1'b1;
      end
    end
    return n;
  endfunction

  a_rd_conflict_free: assert property (@(posedge clk) disable iff (!rst_n)
                                       conflicts(rd_lane_en, rd_lane_pos) == 0)
    else $error("bank_xbar: two reads of one BRAM in a cycle");
  a_wr_conflict_free: assert property (@(posedge clk) disable iff (!rst_n)
                                       conflicts(wr_lane_en, wr_lane_pos) == 0)
    else $error("bank_xbar: two writes to one BRAM in a cycle");
endmodule
