// tb_bootstrap_accumulation: runs the accumulation loop of a bootstrap,
// STEPS = 512 accumulator steps back to back, each step's output fed back
// as the next step's input, at full size.
//
// Key construction: each step uses a noise-free RGSW-like key whose
// polynomials are constants, K[h][j][col] = M[h][col] * 128^j (times R),
// for a random 2x2 matrix M per step. Because the four digits recombine to
// the original coefficients (sum_j 128^j d_j = x mod Q), the step then
// computes exactly, pointwise in the NTT domain,
//     a' = M[0][0] * a + M[1][0] * b,     b' = M[0][1] * a + M[1][1] * b,
// which the testbench tracks cheaply. Every output beat of every step is
// compared. The cycle counts after 32 steps (1/16 of a bootstrap) and after
// all 512 steps are printed and checked against the 114,327 and 1,855,493
// cycles reported for the published implementation.
module tb_bootstrap_accumulation;
  import fhew_pkg::*;

  localparam int STEPS = 512;

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
    repeat (STEPS * 1000 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coef_t M [2][2];
  coef_t acc [2][N], nxt [2][N];
  coef_t kconst [2][NCT][2];

  always_ff @(posedge clk)
    for (int j = 0; j < NCT; j++)
      if (key_req[j])
        for (int p = 0; p < LANES; p++) key_data[j][p] <= kconst[key_half[j]][j][key_col[j]];

  longint t0, t_step;
  initial begin
    in_valid = 0; in_data = '0;
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < N; i++) acc[h][i] = coef_t'($urandom % 32'(Q));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    t0 = $time / 10;
    for (int step = 0; step < STEPS; step++) begin
      for (int h = 0; h < 2; h++)
        for (int c = 0; c < 2; c++) begin
          M[h][c] = coef_t'($urandom % 32'(Q));
          for (int j = 0; j < NCT; j++)
            kconst[h][j][c] = to_mont(mulmod(64'(M[h][c]), powmod(64'd128, j)));
        end
      for (int c = 0; c < 2; c++)
        for (int i = 0; i < N; i++)
          nxt[c][i] = mod_add(coef_t'(mulmod(64'(M[0][c]), 64'(acc[0][i]))),
                              coef_t'(mulmod(64'(M[1][c]), 64'(acc[1][i]))));
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
      acc = nxt;
      t_step = $time / 10 - t0;
      if (step == STEPS / 16 - 1) begin
        $display("1/16 of the accumulation (%0d steps): %0d cycles", step + 1, t_step);
        checks++;
        if (t_step > 114327) failures++;
      end
    end
    $display("accumulation (%0d steps): %0d cycles", STEPS, t_step);
    checks++;
    if (t_step > 1855493) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
