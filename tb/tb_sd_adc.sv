// tb_sd_adc: the ADC digital part closed through a behavioural RC filter and
// comparator. DC inputs across the range must settle to the ideal 8-bit
// code (the input rounded to 8 bits) within +/-2 LSB and stay there; the mean of the 13-bit counter must
// match the input within 0.5 % of full scale; a slowly varying (rectified
// sine) input must be tracked within +/-3.5 LSB.
module tb_sd_adc;
  localparam int unsigned M = 13, N = 8;
  localparam real VDD = 3.3;
  logic clk = 0, rst_n = 0;
  logic cmp, bitstream;
  logic [N-1:0] dout;
  logic [M-1:0] count;
  real vin = 0.0, vfilt;
  int checks = 0, failures = 0;

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  sd_adc #(.M(M), .N(N)) dut (.clk, .rst_n, .cmp_in(cmp), .bitstream, .dout, .count);
  adc_rc_comparator #(.VDD(VDD)) afe (.clk, .bitstream, .vin, .cmp, .vfilt);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real levels[7];
    real sum, ideal, err_max;
    int  code;
    real worst;
    levels = '{0.2, 0.5, 1.0, 1.65, 2.2, 2.9, 3.1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (levels[k]) begin
      vin = levels[k];
      repeat (20000) @(posedge clk);               // settle
      sum = 0.0; worst = 0.0;
      ideal = vin / VDD * 256.0;
      for (int i = 0; i < 16384; i++) begin
        @(posedge clk); #1;
        sum += real'(count);
        code = int'(dout);
        if (fabs(real'(code) - ideal) > worst) worst = fabs(real'(code) - ideal);
      end
      checks++;
      if (worst > 2.0) begin
        failures++;
        $display("vin=%f: code strays %f LSB from %f", vin, worst, ideal);
      end
      checks++;
      if (fabs(sum / 16384.0 / 8192.0 * VDD - vin) > 0.005 * VDD) begin
        failures++;
        $display("vin=%f: mean count %f", vin, sum / 16384.0);
      end
    end
    // Rectified sine, 2.8 V peak, 1.6 ms half period (6x faster than 50 Hz).
    err_max = 0.0;
    for (int i = 0; i < 340000; i++) begin
      @(posedge clk); #1;
      vin = 2.8 * fabs($sin(3.14159265 * real'(i) / 160000.0));
      if (i > 20000 && fabs(real'(dout) - vin / VDD * 256.0) > err_max)
        err_max = fabs(real'(dout) - vin / VDD * 256.0);
    end
    checks++;
    if (err_max > 3.5) begin
      failures++;
      $display("sine tracking error %f LSB", err_max);
    end
    $display("sine tracking worst error %f LSB", err_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
