// tb_poly_ram: writes every word of all 64 banks (one word per bank per
// cycle, each bank at a different address), reads them back with
// simultaneous writes to other addresses, and checks the one-cycle read
// latency and read-before-write behaviour on a same-address collision.
module tb_poly_ram;
  import fhew_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic  [NBANK-1:0] rd_en, wr_en;
  addr_t [NBANK-1:0] rd_addr, wr_addr;
  coef_t [NBANK-1:0] rd_data, wr_data;
  int checks = 0, failures = 0;
  coef_t model [NBANK][DEPTH];

  poly_ram dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = '0; wr_en = '0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int c = 0; c < DEPTH; c++) begin
      for (int k = 0; k < NBANK; k++) begin
        wr_en[k]   = 1'b1;
        wr_addr[k] = addr_t'(c + k);
        wr_data[k] = coef_t'($urandom % 32'(Q));
        model[k][addr_t'(c + k)] = wr_data[k];
      end
      @(posedge clk); #1;
    end
    wr_en = '0;
    for (int c = 0; c < DEPTH; c++) begin
      for (int k = 0; k < NBANK; k++) begin
        rd_en[k]   = 1'b1;
        rd_addr[k] = addr_t'(c);
        // write the same word in half of the banks: read must see old data
        wr_en[k]   = (k % 2 == 0);
        wr_addr[k] = addr_t'(c);
        wr_data[k] = coef_t'(k + c);
      end
      @(posedge clk); #1;
      for (int k = 0; k < NBANK; k++) begin
        checks++;
        if (rd_data[k] !== model[k][c]) failures++;
        if (k % 2 == 0) model[k][c] = coef_t'(k + c);
      end
    end
    wr_en = '0;
    for (int c = 0; c < DEPTH; c++) begin
      for (int k = 0; k < NBANK; k++) rd_addr[k] = addr_t'(c);
      @(posedge clk); #1;
      for (int k = 0; k < NBANK; k++) begin
        checks++;
        if (rd_data[k] !== model[k][c]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
