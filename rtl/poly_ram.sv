// poly_ram: one polynomial's worth of data BRAMs, NBANK = 64 banks of
// DEPTH = 16 words of 27 bits (1024 coefficients).
//
// Each bank is a simple dual-port BRAM with one write port and one
// synchronous read port (read data valid the cycle after rd_en), matching
// the one-read/one-write BRAM configuration the bank schedule is built
// around. A read and a write of the same word in the same cycle return the
// old word. Which coefficient lives where is set by fhew_pkg::bank_of and
// addr_of; this module only stores.
module poly_ram
  import fhew_pkg::*;
(
  input  logic                  clk,
  input  logic  [NBANK-1:0]     rd_en,
  input  addr_t [NBANK-1:0]     rd_addr,
  output coef_t [NBANK-1:0]     rd_data,
  input  logic  [NBANK-1:0]     wr_en,
  input  addr_t [NBANK-1:0]     wr_addr,
  input  coef_t [NBANK-1:0]     wr_data
);
  for (genvar k = 0; k < NBANK; k++) begin : g_bank
    coef_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en[k]) mem[wr_addr[k]] <= wr_data[k];
      if (rd_en[k]) rd_data[k] <= mem[rd_addr[k]];
    end
  end
endmodule
