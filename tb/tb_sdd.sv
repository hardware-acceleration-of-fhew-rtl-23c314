// tb_sdd: streams beats of random and corner-case coefficients (0, 1,
// Q-1, Q/2 and neighbours, values near multiples of 2^7) through sdd. Each
// digit is compared with a reference decomposition, and the digits are
// also recombined, sum_l r_l * 128^l mod Q, which must give the input back.
module tb_sdd;
  import fhew_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  lanes_t in_data;
  lanes_t digits [DG];
  int checks = 0, failures = 0;

  sdd dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 100;
  lanes_t beats [NB];
  initial begin
    for (int c = 0; c < NB; c++)
      for (int p = 0; p < LANES; p++) beats[c][p] = coef_t'($urandom % 32'(Q));
    beats[0][0] = 0;            beats[0][1] = 1;
    beats[0][2] = coef_t'(Q-1); beats[0][3] = coef_t'(Q >> 1);
    beats[0][4] = coef_t'((Q >> 1) - 1); beats[0][5] = coef_t'((Q >> 1) + 1);
    beats[0][6] = 63; beats[0][7] = 64; beats[0][8] = 65; beats[0][9] = coef_t'(Q - 64);
    beats[0][10] = coef_t'(Q - 65); beats[0][11] = 27'd8191; beats[0][12] = 27'd8192;
    in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c <= NB; c++) begin
      in_valid = (c < NB);
      if (c < NB) in_data = beats[c];
      @(posedge clk); #1;
      if (c < NB) begin
        checks++;
        if (!out_valid) failures++;
        for (int p = 0; p < LANES; p++) begin
          logic [63:0] sum, pw;
          sum = 0; pw = 1;
          for (int l = 0; l < DG; l++) begin
            checks++;
            if (digits[l][p] !== sdd_ref(beats[c][p], l)) failures++;
            // a digit is small: r or Q - |r| with |r| <= 64
            if (!(digits[l][p] <= 63 || digits[l][p] >= coef_t'(Q - 64))) failures++;
            sum = (sum + mulmod(64'(digits[l][p]), pw)) % Q;
            pw = pw * 128;
          end
          checks++;
          if (sum != 64'(beats[c][p])) begin
            failures++;
            if (failures < 5) $display("coef %0d: recombined %0d", beats[c][p], sum);
          end
        end
      end
    end
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
