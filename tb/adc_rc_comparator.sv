// adc_rc_comparator: behavioural model of the analog half of the
// sigma-delta ADC, used only in simulation.
//
// The bitstream drives an RC low-pass (1 kOhm, 220 pF, tau = 220 ns) between
// 0 V and the logic supply VDD; a comparator compares the analog input with
// the filter voltage. The filter is integrated with an exact first-order
// step once per clock. `cmp` is 1 when the input is above the filtered
// stream and is registered, as the synchroniser in the chip would see it.
module adc_rc_comparator #(
  parameter real VDD      = 3.3,
  parameter real TAU_NS   = 220.0,
  parameter real T_CLK_NS = 10.0
) (
  input  logic clk,
  input  logic bitstream,
  input  real  vin,
  output logic cmp,
  output real  vfilt
);

  real alpha;

  initial begin
    alpha = 1.0 - $exp(-T_CLK_NS / TAU_NS);
    vfilt = 0.0;
    cmp   = 1'b0;
  end

  always @(posedge clk) begin
    vfilt <= vfilt + ((bitstream ? VDD : 0.0) - vfilt) * alpha;
    cmp   <= (vin > vfilt);
  end

endmodule
