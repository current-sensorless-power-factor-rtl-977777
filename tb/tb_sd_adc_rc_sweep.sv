// tb_sd_adc_rc_sweep: the RC-filter trade-off of the sigma-delta ADC.
//
// Three copies of sd_adc with an 8-bit counter (M = N = 8) run from a
// 50 MHz clock, each closed through its own behavioural RC filter and
// comparator: 1 kOhm with 22 pF, 220 pF and 2.2 nF (tau = 22, 220 and
// 2200 ns). All three see the same DC input, stepped across the range.
// After settling, each copy is watched for a fixed window and two figures
// are kept, worst case over all levels, both as a fraction of the 256-code
// full scale:
//   - oscillation: peak-to-peak swing of the counter;
//   - error: distance of the counter's window mean from the ideal code.
//
// The filter sizes, the clock and the 8-bit counter are the measurement
// setup the method was characterised with; the published figures are
// 16 / 22 / 59 % oscillation and 7.4 / 1.5 / 1.1 % error. The comparator
// here is ideal and noiseless, so the absolute numbers are not expected to
// match. What is checked is the trade-off itself:
//   - the oscillation grows with the RC constant, and the 2.2 nF filter
//     oscillates at least twice as much as the 220 pF one;
//   - the error of the 22 pF filter is the largest of the three;
//   - with 220 pF the error stays within 2 % and the oscillation within
//     30 % of full scale.
// The thresholds are this design's own.
module tb_sd_adc_rc_sweep;
  localparam int unsigned M = 8, N = 8, NF = 3;
  localparam real VDD = 3.3;
  localparam real T_CLK_NS = 20.0;
  localparam real TAU_NS [NF] = '{22.0, 220.0, 2200.0};
  localparam int SETTLE = 20000, WINDOW = 16384;

  logic clk = 0, rst_n = 0;
  logic cmp [NF], bitstream [NF];
  logic [N-1:0] dout [NF];
  logic [M-1:0] count [NF];
  real vfilt [NF];
  real vin = 0.0;
  int checks = 0, failures = 0;

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  for (genvar f = 0; f < NF; f++) begin : g_filt
    sd_adc #(.M(M), .N(N)) u_adc (
      .clk, .rst_n, .cmp_in(cmp[f]), .bitstream(bitstream[f]), .dout(dout[f]), .count(count[f]));
    adc_rc_comparator #(.VDD(VDD), .TAU_NS(TAU_NS[f]), .T_CLK_NS(T_CLK_NS)) u_afe (
      .clk, .bitstream(bitstream[f]), .vin, .cmp(cmp[f]), .vfilt(vfilt[f]));
  end

  always #10 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real levels[9];
    real osc [NF], err [NF];
    real sum [NF];
    int  lo [NF], hi [NF];
    real ideal;
    levels = '{0.15, 0.4, 0.8, 1.2, 1.65, 2.0, 2.5, 2.9, 3.15};
    foreach (osc[f]) begin osc[f] = 0.0; err[f] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (levels[k]) begin
      vin = levels[k];
      ideal = vin / VDD * 256.0;
      repeat (SETTLE) @(posedge clk);
      foreach (sum[f]) begin sum[f] = 0.0; lo[f] = 255; hi[f] = 0; end
      for (int i = 0; i < WINDOW; i++) begin
        @(posedge clk); #1;
        for (int f = 0; f < NF; f++) begin
          sum[f] += real'(count[f]);
          if (int'(count[f]) < lo[f]) lo[f] = int'(count[f]);
          if (int'(count[f]) > hi[f]) hi[f] = int'(count[f]);
        end
      end
      for (int f = 0; f < NF; f++) begin
        if (real'(hi[f] - lo[f]) / 256.0 > osc[f]) osc[f] = real'(hi[f] - lo[f]) / 256.0;
        if (fabs(sum[f] / WINDOW - ideal) / 256.0 > err[f]) err[f] = fabs(sum[f] / WINDOW - ideal) / 256.0;
      end
    end
    for (int f = 0; f < NF; f++)
      $display("tau %6.0f ns: max oscillation %5.1f %%  max error %5.2f %%",
               TAU_NS[f], 100.0 * osc[f], 100.0 * err[f]);

    checks++;
    if (!(osc[0] < osc[1] && osc[1] < osc[2])) begin
      failures++;
      $display("oscillation does not grow with the RC constant");
    end
    checks++;
    if (osc[2] < 2.0 * osc[1]) begin
      failures++;
      $display("2.2 nF oscillation not at least twice the 220 pF one");
    end
    checks++;
    if (!(err[0] > err[1] && err[0] > err[2])) begin
      failures++;
      $display("smallest filter does not have the largest error");
    end
    checks++;
    if (err[1] > 0.02 || osc[1] > 0.30) begin
      failures++;
      $display("220 pF filter outside 2 %% error / 30 %% oscillation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
