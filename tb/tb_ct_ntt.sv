// tb_ct_ntt: runs one ct_ntt unit through both halves of an accumulation.
// Two random digit polynomials are loaded (half 0, then half 1); a key model
// answers key requests from random key polynomials one cycle later. The two
// column results are compared with
//   col c = D0 * K0c * R^-1 + D1 * K1c * R^-1,  D = O(N^2) NTT of the digit.
// Also checked: the NTT + MAC latency from the last load beat to the return
// to LOAD, and that nothing leaves before out_start.
module tb_ct_ntt;
  import fhew_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_half, key_req, key_col, key_half;
  logic result_ready, out_start, out_valid, out_col;
  logic [4:0] key_beat;
  lanes_t in_data, key_data, out_data;
  int checks = 0, failures = 0;

  ct_ntt dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  poly_t d [2], D [2], K [2][2], expct [2];
  int t_last, t_done, nkey;

  // key model: one-cycle read latency
  always_ff @(posedge clk) begin
    if (key_req) begin
      nkey <= nkey + 1;
      for (int p = 0; p < LANES; p++) key_data[p] <= K[key_half][key_col][key_beat*LANES+p];
    end
  end

  initial begin
    in_valid = 0; in_data = '0; in_half = 0; out_start = 0; nkey = 0;
    for (int h = 0; h < 2; h++) begin
      for (int i = 0; i < N; i++) d[h][i] = coef_t'($urandom % 32'(Q));
      for (int c = 0; c < 2; c++)
        for (int i = 0; i < N; i++) K[h][c][i] = coef_t'($urandom % 32'(Q));
      ntt_ref(d[h], D[h]);
    end
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < N; i++)
        expct[c][i] = mod_add(mont_ref(D[0][i], K[0][c][i]), mont_ref(D[1][i], K[1][c][i]));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < 2; h++) begin
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      for (int c = 0; c < BEATS; c++) begin
        in_valid <= 1'b1;
        in_half  <= 1'(h);
        for (int p = 0; p < LANES; p++) in_data[p] <= d[h][c*LANES+p];
        @(posedge clk);
      end
      in_valid <= 1'b0;
      t_last = $time / 10;
      @(posedge clk);
      while (!(in_ready || result_ready)) @(posedge clk);
      t_done = $time / 10;
      if (h == 0) begin
        checks++;
        // 210 NTT cycles + 64 MAC cycles + 5 drain + 1
        if (t_done - t_last != 10*(16+1+BF_LAT) + 64 + (1+BF_LAT) + 1) begin
          failures++;
          $display("NTT+MAC time %0d", t_done - t_last);
        end
      end
    end
    checks++;
    if (nkey != 128) begin failures++; $display("key beats %0d", nkey); end
    repeat (50) @(posedge clk);
    checks++;
    if (out_valid || !result_ready) failures++;
    out_start <= 1'b1;
    @(posedge clk);
    out_start <= 1'b0;
    while (!out_valid) @(posedge clk);
    for (int b = 0; b < 2*BEATS; b++) begin
      checks++;
      if (!out_valid || out_col != 1'(b / BEATS)) failures++;
      for (int p = 0; p < LANES; p++) begin
        checks++;
        if (out_data[p] !== expct[b/BEATS][(b%BEATS)*LANES+p]) begin
          failures++;
          if (failures < 10) $display("col %0d coef %0d: got %0d exp %0d", b/BEATS,
                                      (b%BEATS)*LANES+p, out_data[p], expct[b/BEATS][(b%BEATS)*LANES+p]);
        end
      end
      @(posedge clk);
    end
    checks++;
    if (out_valid || !in_ready) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
