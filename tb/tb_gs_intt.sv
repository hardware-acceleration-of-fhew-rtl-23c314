// tb_gs_intt: loads NTT-domain polynomials (computed from random
// coefficients with the O(N^2) definition) into gs_intt, checks that the
// coefficients come back in natural order, and checks the cycle count from
// the last load beat to the first output beat. Two polynomials are run to
// check that the unit returns to LOAD and that out_ready holds the unload.
module tb_gs_intt;
  import fhew_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_ready, out_valid, busy, holding;
  lanes_t in_data, out_data;
  int checks = 0, failures = 0;

  gs_intt dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  poly_t x, X;
  int t_last, t_first;

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < N; i++) x[i] = coef_t'($urandom % 32'(Q));
      if (rep == 0) x[0] = coef_t'(Q - 1);
      ntt_ref(x, X);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      for (int c = 0; c < BEATS; c++) begin
        in_valid <= 1'b1;
        for (int p = 0; p < LANES; p++) in_data[p] <= X[c*LANES+p];
        @(posedge clk);
      end
      t_last = $time / 10;
      in_valid <= 1'b0;
      // hold the unload back for a while on the second polynomial
      out_ready <= (rep == 0);
      if (rep == 1) begin
        repeat (400) @(posedge clk);
        checks += 2;
        if (out_valid) begin failures++; $display("unload ignored out_ready"); end
        if (!holding) failures++;
        out_ready <= 1'b1;
      end
      while (!out_valid) @(posedge clk);
      t_first = $time / 10;
      if (rep == 0) begin
        checks++;
        // 210 run cycles + 1 wait + 1 unload read + MUL_LAT
        if (t_first - t_last != 10*(16+1+BF_LAT) + 2 + 1 + MUL_LAT) begin
          failures++;
          $display("latency %0d", t_first - t_last);
        end
      end
      for (int c = 0; c < BEATS; c++) begin
        checks++;
        if (!out_valid) failures++;
        for (int p = 0; p < LANES; p++) begin
          checks++;
          if (out_data[p] !== x[c*LANES+p]) begin
            failures++;
            if (failures < 10) $display("coef %0d: got %0d exp %0d", c*LANES+p, out_data[p], x[c*LANES+p]);
          end
        end
        @(posedge clk);
      end
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
