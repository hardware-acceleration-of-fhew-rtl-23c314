// tb_index_reversal: index_reversal with a bank_xbar and a poly_ram behind
// it. A random polynomial is loaded; each load beat must target the
// bit-reversed positions (bit reversal computed here bit by bit). Then the
// polynomial is unloaded and every output coefficient i must equal
// X[i] * N^-1 * psi^-i mod Q, with the first beat 1 + MUL_LAT cycles after
// the unload starts and 32 consecutive valid beats.
module tb_index_reversal;
  import fhew_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld_valid, ld_last, ul_start, ul_busy, out_valid;
  lanes_t ld_data, wr_lane_data, rd_lane_data, out_data;
  logic [LANES-1:0] wr_lane_en, rd_lane_en;
  pos_t [LANES-1:0] wr_lane_pos, rd_lane_pos;
  logic  [NBANK-1:0] rd_en, wr_en;
  addr_t [NBANK-1:0] rd_addr, wr_addr;
  coef_t [NBANK-1:0] rd_data, wr_data;
  int checks = 0, failures = 0;

  index_reversal dut (.*);
  bank_xbar #(.NL(LANES)) u_xbar (
    .clk, .rst_n,
    .rd_lane_en, .rd_lane_pos, .rd_lane_data,
    .wr_lane_en, .wr_lane_pos, .wr_lane_data,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
  );
  poly_ram u_ram (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rev10(int x);
    int r;
    r = 0;
    for (int i = 0; i < 10; i++) r = r * 2 + ((x >> i) & 1);
    return r;
  endfunction

  poly_t X;
  int t0, t1;
  initial begin
    ld_valid = 0; ld_data = '0; ul_start = 0;
    for (int i = 0; i < N; i++) X[i] = coef_t'($urandom % 32'(Q));
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int c = 0; c < BEATS; c++) begin
      ld_valid = 1'b1;
      for (int p = 0; p < LANES; p++) ld_data[p] = X[c*LANES+p];
      #1;
      for (int p = 0; p < LANES; p++) begin
        checks++;
        if (!wr_lane_en[p] || int'(wr_lane_pos[p]) != rev10(c*LANES+p)) failures++;
      end
      checks++;
      if (ld_last != (c == BEATS - 1)) failures++;
      @(posedge clk); #1;
    end
    ld_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 ul_start = 1'b1;
    t0 = $time / 10;
    @(posedge clk); #1;
    ul_start = 1'b0;
    while (!out_valid) begin @(posedge clk); #1; end
    t1 = $time / 10;
    checks++;
    if (t1 - t0 != 2 + MUL_LAT) begin failures++; $display("unload latency %0d", t1 - t0); end
    for (int c = 0; c < BEATS; c++) begin
      checks++;
      if (!out_valid) failures++;
      for (int p = 0; p < LANES; p++) begin
        int i;
        i = c*LANES + p;
        checks++;
        if (out_data[p] !== coef_t'(mulmod(mulmod(64'(X[i]), invmod(64'(N))), powmod(invmod(PSI), i)))) begin
          failures++;
          if (failures < 5) $display("coef %0d got %0d", i, out_data[p]);
        end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (out_valid || ul_busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
