// tb_linear_extrapolator: random sample sequences; the output must equal
// 2*x[n]-x[n-1] clamped to the code range, or x[n] when prediction is off.
module tb_linear_extrapolator;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0, sample_en = 0, extrap_en = 1;
  logic [W-1:0] din = '0, dout;
  logic clamped;
  int checks = 0, failures = 0;
  int xn = 0, xn1 = 0, expct, n_lo = 0, n_hi = 0;

  linear_extrapolator #(.W(W)) dut (.clk, .rst_n, .sample_en, .extrap_en, .din, .dout, .clamped);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      sample_en = ($urandom_range(0, 2) == 0);
      extrap_en = ($urandom_range(0, 5) != 0);
      // mostly slow ramps, sometimes jumps that force the clamp
      if ($urandom_range(0, 9) == 0) din = W'($urandom);
      else din = W'(int'(din) + int'($urandom_range(0, 6)) - 3);
      @(posedge clk);
      if (sample_en) begin xn1 = xn; xn = int'(din); end
      #1;
      expct = extrap_en ? 2 * xn - xn1 : xn;
      if (expct < 0) begin expct = 0; n_lo++; end
      if (expct > (1 << W) - 1) begin expct = (1 << W) - 1; n_hi++; end
      checks++;
      if (int'(dout) != expct) begin
        failures++;
        $display("x[n]=%0d x[n-1]=%0d en=%0d: dout=%0d expected %0d", xn, xn1, extrap_en, dout, expct);
      end
    end
    checks++; if (n_lo == 0 || n_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
