// tb_bank_xbar: a bank_xbar in front of a poly_ram. For every NTT stage and
// cycle of the butterfly schedule, and for natural and bit-reversed beats,
// the 64 (or 32) lane positions are written with their own index and read
// back; each lane must get its own value, and each position must end up in
// its own BRAM word. The number of cycles in which the crossbar's
// conflict assertion would fire is counted independently.
module tb_bank_xbar;
  import fhew_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  localparam int NL = 64;

  logic  [NL-1:0]    rd_lane_en, wr_lane_en;
  pos_t  [NL-1:0]    rd_lane_pos, wr_lane_pos;
  coef_t [NL-1:0]    rd_lane_data, wr_lane_data;
  logic  [NBANK-1:0] rd_en, wr_en;
  addr_t [NBANK-1:0] rd_addr, wr_addr;
  coef_t [NBANK-1:0] rd_data, wr_data;
  int checks = 0, failures = 0;

  bank_xbar #(.NL(NL)) dut (.*);
  poly_ram u_ram (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input pos_t pos [NL], input int nl);
    logic [NBANK-1:0] used;
    used = '0;
    for (int l = 0; l < NL; l++) begin
      wr_lane_en[l]   = (l < nl);
      wr_lane_pos[l]  = pos[l];
      wr_lane_data[l] = coef_t'(pos[l]) + 27'd1000;
      rd_lane_en[l]   = 1'b0;
    end
    @(posedge clk); #1;
    wr_lane_en = '0;
    for (int l = 0; l < NL; l++) begin
      rd_lane_en[l]  = (l < nl);
      rd_lane_pos[l] = pos[l];
      if (l < nl) begin
        checks++;
        if (used[bank_of(pos[l])]) failures++;
        used[bank_of(pos[l])] = 1'b1;
      end
    end
    @(posedge clk); #1;
    rd_lane_en = '0;
    for (int l = 0; l < nl; l++) begin
      checks++;
      if (rd_lane_data[l] !== coef_t'(pos[l]) + 27'd1000) failures++;
    end
  endtask

  pos_t pos [NL];
  initial begin
    rd_lane_en = '0; wr_lane_en = '0; rd_lane_pos = '0; wr_lane_pos = '0; wr_lane_data = '0;
    for (int s = 0; s < LOGN; s++)
      for (int c = 0; c < BFLY_CYC; c++) begin
        for (int p = 0; p < LANES; p++) begin
          pos[2*p]   = bfly_pos(9'(c*LANES + p), s);
          pos[2*p+1] = pos[2*p] | (pos_t'(1) << s);
        end
        access(pos, NL);
      end
    for (int c = 0; c < BEATS; c++) begin
      for (int p = 0; p < LANES; p++) pos[p] = brv(pos_t'(c*LANES + p));
      access(pos, LANES);
      for (int p = 0; p < LANES; p++) pos[p] = pos_t'(c*LANES + p);
      access(pos, LANES);
    end
    // every position owns a distinct (bank, address) word
    begin
      bit seen [NBANK][DEPTH];
      seen = '{default: 1'b0};
      for (int j = 0; j < N; j++) begin
        checks++;
        if (seen[bank_of(pos_t'(j))][addr_of(pos_t'(j))]) failures++;
        seen[bank_of(pos_t'(j))][addr_of(pos_t'(j))] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
