// tb_mont_mul: feeds one operand pair per cycle (random values and the
// corner values 0, 1, Q-1) and compares each result, MUL_LAT cycles later,
// with a * b * R^-1 mod Q computed through the modular inverse of R.
module tb_mont_mul;
  import fhew_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  coef_t a, b, p;
  int checks = 0, failures = 0;
  localparam int NV = 2000;
  coef_t va [NV], vb [NV];

  mont_mul dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NV; i++) begin
      va[i] = coef_t'($urandom % 32'(Q));
      vb[i] = coef_t'($urandom % 32'(Q));
    end
    va[0] = coef_t'(Q - 1); vb[0] = coef_t'(Q - 1);
    va[1] = 0;              vb[1] = coef_t'(Q - 1);
    va[2] = 1;              vb[2] = 1;
    va[3] = coef_t'(Q - 1); vb[3] = to_mont(64'd5);
    for (int i = 0; i < NV + MUL_LAT; i++) begin
      if (i < NV) begin a = va[i]; b = vb[i]; end
      @(posedge clk);
      #1;
      if (i >= MUL_LAT - 1 && i - (MUL_LAT - 1) < NV) begin
        checks++;
        if (p !== mont_ref(va[i-MUL_LAT+1], vb[i-MUL_LAT+1])) begin
          failures++;
          if (failures < 5) $display("%0d: got %0d", i, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
