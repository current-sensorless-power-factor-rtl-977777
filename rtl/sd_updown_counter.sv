// sd_updown_counter: the up/down counter that holds the measured voltage in
// the sigma-delta ADC.
//
// Each enabled clock the counter steps by one: up when the comparator says
// the analog input is above the filtered bitstream, down otherwise. The
// sigma-delta feedback loop around it drives the counter until its mean value,
// read as a fraction of full scale, equals the measured voltage. The counter
// saturates at 0 and at 2^M-1 instead of wrapping (this design's choice: a
// wrap would turn a full-scale input into a zero reading). The count
// resets to 0.
//
// Interface: `up` is the synchronised comparator output, `en` qualifies the
// step, `count` is the registered value (visible one cycle after the step).
module sd_updown_counter #(
  parameter int unsigned M = pfc_pkg::ADC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         up,
  output logic [M-1:0] count
);

  localparam logic [M-1:0] MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (en) begin
      if (up) begin
        if (count != MAX) count <= count + 1'b1;
      end else begin
        if (count != '0) count <= count - 1'b1;
      end
    end
  end

endmodule
