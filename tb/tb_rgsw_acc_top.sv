// tb_rgsw_acc_top: end-to-end test of the RGSW accumulator at full size
// (N = 1024, 32 PEs, four CT units, default parameters).
//
// Two accumulator steps are run back to back; the output of the first is
// fed back unchanged as the input of the second. A key model answers the
// key requests of each CT unit one cycle later from random key polynomials
// (a fresh key per step). The expected accumulator is computed from the
// definitions: coefficients by an O(N^2) inverse NTT, digits by the
// reference signed decomposition, transforms by the O(N^2) NTT, then
//     out_c[k] = sum_{h,j} D[h][j][k] * K[h][j][c][k] * R^-1 mod Q.
// Mechanisms counted (each must occur): INTT stalled behind the CT units,
// first-half key products (stored), second-half key products (accumulated),
// a step started from the previous step's output. The step time, first
// input beat to last output beat, must stay under the 3616 cycles reported
// for one accumulation step.
module tb_rgsw_acc_top;
  import fhew_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_col, intt_stall;
  lanes_t in_data, out_data;
  logic [NCT-1:0] key_req, key_col, key_half;
  logic [4:0] key_beat [NCT];
  lanes_t key_data [NCT];
  int checks = 0, failures = 0;

  rgsw_acc_top dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  poly_t K [2][NCT][2];
  poly_t acc [2], nxt [2], coef, dig, D [2][NCT];
  int n_stall, n_key0, n_key1, n_feedback;

  always_ff @(posedge clk) begin
    if (intt_stall) n_stall <= n_stall + 1;
    for (int j = 0; j < NCT; j++)
      if (key_req[j]) begin
        if (key_half[j]) n_key1 <= n_key1 + 1;
        else             n_key0 <= n_key0 + 1;
        for (int p = 0; p < LANES; p++)
          key_data[j][p] <= K[key_half[j]][j][key_col[j]][key_beat[j]*LANES+p];
      end
  end

  int t_start, t_end;
  initial begin
    n_stall = 0; n_key0 = 0; n_key1 = 0; n_feedback = 0;
    in_valid = 0; in_data = '0;
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < N; i++) acc[h][i] = coef_t'($urandom % 32'(Q));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int step = 0; step < 2; step++) begin
      // key and expected result of this step
      for (int h = 0; h < 2; h++)
        for (int j = 0; j < NCT; j++)
          for (int c = 0; c < 2; c++)
            for (int i = 0; i < N; i++) K[h][j][c][i] = coef_t'($urandom % 32'(Q));
      for (int h = 0; h < 2; h++) begin
        intt_ref(acc[h], coef);
        for (int j = 0; j < NCT; j++) begin
          for (int i = 0; i < N; i++) dig[i] = sdd_ref(coef[i], j);
          ntt_ref(dig, D[h][j]);
        end
      end
      for (int c = 0; c < 2; c++)
        for (int i = 0; i < N; i++) begin
          coef_t s;
          s = 0;
          for (int h = 0; h < 2; h++)
            for (int j = 0; j < NCT; j++) s = mod_add(s, mont_ref(D[h][j][i], K[h][j][c][i]));
          nxt[c][i] = s;
        end
      if (step > 0) n_feedback++;
      // stream the accumulator in, a then b
      t_start = $time / 10;
      fork
        begin
          for (int b = 0; b < 2*BEATS; b++) begin
            in_valid = 1'b1;
            for (int p = 0; p < LANES; p++) in_data[p] = acc[b/BEATS][(b%BEATS)*LANES+p];
            #1;
            while (!in_ready) begin @(posedge clk); #1; end
            @(posedge clk); #1;
          end
          in_valid = 1'b0;
        end
        begin
          for (int b = 0; b < 2*BEATS; b++) begin
            while (!out_valid) begin @(posedge clk); #1; end
            checks++;
            if (out_col != 1'(b / BEATS)) failures++;
            for (int p = 0; p < LANES; p++) begin
              checks++;
              if (out_data[p] !== nxt[b/BEATS][(b%BEATS)*LANES+p]) begin
                failures++;
                if (failures < 10) $display("step %0d col %0d coef %0d: got %0d exp %0d", step,
                  b/BEATS, (b%BEATS)*LANES+p, out_data[p], nxt[b/BEATS][(b%BEATS)*LANES+p]);
              end
            end
            @(posedge clk); #1;
          end
        end
      join
      t_end = $time / 10;
      $display("step %0d: %0d cycles", step, t_end - t_start);
      checks++;
      if (t_end - t_start > 3616) failures++;
      acc = nxt;
    end
    $display("mechanisms: intt_stall cycles=%0d key beats half0=%0d half1=%0d feedback steps=%0d",
             n_stall, n_key0, n_key1, n_feedback);
    checks += 4;
    if (n_stall == 0)    failures++;
    if (n_key0 == 0)     failures++;
    if (n_key1 == 0)     failures++;
    if (n_feedback == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
