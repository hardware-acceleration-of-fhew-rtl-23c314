// tb_ct_butterfly: one butterfly per cycle with random operands; checks
// E = a + b*w*R^-1 and O = a - b*w*R^-1 (mod Q) BF_LAT cycles later.
module tb_ct_butterfly;
  import fhew_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  coef_t a, b, w, e, o;
  int checks = 0, failures = 0;
  localparam int NV = 2000;
  coef_t va [NV], vb [NV], vw [NV];

  ct_butterfly dut (.*);

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
      vw[i] = coef_t'($urandom % 32'(Q));
    end
    va[0] = 0; vb[0] = coef_t'(Q - 1);
    va[1] = coef_t'(Q - 1); vb[1] = coef_t'(Q - 1);
    for (int i = 0; i < NV + BF_LAT; i++) begin
      if (i < NV) begin a = va[i]; b = vb[i]; w = vw[i]; end
      @(posedge clk);
      #1;
      if (i >= BF_LAT - 1 && i - (BF_LAT - 1) < NV) begin
        int k;
        logic [63:0] s, d;
        k = i - (BF_LAT - 1);
        d = 64'(mont_ref(vb[k], vw[k]));
        s = (64'(va[k]) + d) % Q;
        d = (64'(va[k]) + Q - d) % Q;
        checks += 2;
        if (e !== coef_t'(s)) failures++;
        if (o !== coef_t'(d)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
