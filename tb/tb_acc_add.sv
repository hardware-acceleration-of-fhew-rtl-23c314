// tb_acc_add: random beats from four sources, including all-(Q-1) beats
// that make every partial sum wrap; checks the modular sum of each lane and
// the column tag two cycles later.
module tb_acc_add;
  import fhew_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_col, out_valid, out_col;
  lanes_t in_data [NCT];
  lanes_t out_data;
  int checks = 0, failures = 0;

  acc_add dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 200;
  lanes_t src [NB][NCT];
  initial begin
    for (int b = 0; b < NB; b++)
      for (int j = 0; j < NCT; j++)
        for (int p = 0; p < LANES; p++)
          src[b][j][p] = (b == 0) ? coef_t'(Q - 1) : coef_t'($urandom % 32'(Q));
    in_valid = 0; in_col = 0;
    in_data = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB + 2; b++) begin
      in_valid = (b < NB);
      in_col   = 1'(b);
      if (b < NB) in_data = src[b];
      @(posedge clk); #1;
      if (b >= 1 && b - 1 < NB) begin
        int k;
        k = b - 1;
        checks++;
        if (!out_valid || out_col != 1'(k)) failures++;
        for (int p = 0; p < LANES; p++) begin
          logic [63:0] s;
          s = 0;
          for (int j = 0; j < NCT; j++) s += 64'(src[k][j][p]);
          checks++;
          if (out_data[p] !== coef_t'(s % Q)) failures++;
        end
      end
    end
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
