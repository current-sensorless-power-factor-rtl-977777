// linear_extrapolator: compensates the sample-and-hold and register delay
// of an acquired voltage by first-order prediction.
//
// Each `sample_en` pulse stores a new sample x[n] and moves the old one to
// x[n-1]. The output is the prediction x[n+1] = 2*x[n] - x[n-1], clamped
// to 0..2^W-1. Because the line voltages change slowly, one step of linear
// prediction cancels the lag that sampling and registering add, whose sign
// otherwise depends on the slope of the voltage. With `extrap_en` low the
// block outputs the plain held sample x[n]. Where the samples are taken (once
// per switching period in this controller), the clamp and the bypass are
// this design's choices; the prediction formula is the published one.
//
// Interface: `din` is sampled on `sample_en`; `dout` is combinational from
// the two sample registers and therefore changes one cycle after the pulse.
module linear_extrapolator #(
  parameter int unsigned W = pfc_pkg::ADC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample_en,
  input  logic         extrap_en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         clamped
);

  logic [W-1:0]  x_n, x_n1;
  logic signed [W+1:0] pred;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_n  <= '0;
      x_n1 <= '0;
    end else if (sample_en) begin
      x_n  <= din;
      x_n1 <= x_n;
    end
  end

  always_comb begin
    pred    = ($signed({2'b00, x_n}) <<< 1) - $signed({2'b00, x_n1});
    clamped = 1'b0;
    if (!extrap_en) begin
      dout = x_n;
    end else if (pred < 0) begin
      dout    = '0;
      clamped = 1'b1;
    end else if (pred > $signed({2'b00, {W{1'b1}}})) begin
      dout    = '1;
      clamped = 1'b1;
    end else begin
      dout = pred[W-1:0];
    end
  end

endmodule
