// sd_modulator: first-order digital sigma-delta modulator of the ADC.
//
// The M-bit input word is added to an M-bit accumulator; the (M+1)-bit sum
// is split into its carry (the MSB), which is registered and leaves as the
// one-bit stream, and its M low bits, which return to the accumulator.
// Over 2^M cycles the stream therefore holds exactly `din` ones when `din`
// is held, so an RC low-pass on the stream yields din/2^M of the logic
// supply. The structure is the one of the ADC block diagram; reset to zero
// is this design's choice.
//
// Interface: `din` is sampled every clock; `bitstream` is registered.
module sd_modulator #(
  parameter int unsigned M = pfc_pkg::ADC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] din,
  output logic         bitstream
);

  logic [M-1:0] acc;
  logic [M:0]   sum;

  assign sum = {1'b0, din} + {1'b0, acc};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      bitstream <= 1'b0;
    end else begin
      acc       <= sum[M-1:0];
      bitstream <= sum[M];
    end
  end

endmodule
