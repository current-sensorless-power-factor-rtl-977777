// sd_adc: digital part of the low-cost sigma-delta ADC.
//
// Only a comparator and an RC low-pass stay outside the chip. The counter
// holds the measurement; the modulator turns it into a bitstream; the RC
// filter turns the bitstream back into a voltage, which the comparator holds
// against the analog input; the comparator decides whether the counter
// counts up or down. With M counter bits the conversion is slow (the
// bitstream pattern repeats only every 2^M clocks), which suits the slow
// line and bus voltages of a PFC. Because the counter oscillates by a few
// LSBs around the true value, only the N most significant bits are used.
// They are taken rounded rather than truncated (this design's choice):
// truncation would read every voltage 0.5 LSB low on average, and the
// current rebuilder integrates such an offset over the whole line cycle.
//
// The comparator output is asynchronous; it passes through SYNC flip-flops
// before it steers the counter (this design's choice). Latency from a
// comparator edge to the count is SYNC+1 cycles.
//
// Interface: `cmp_in` from the external comparator (1 = analog input above
// the filtered bitstream), `bitstream` to the external RC filter, `dout` the
// N-bit result, `count` the full M-bit counter.
module sd_adc #(
  parameter int unsigned M    = pfc_pkg::ADC_M,
  parameter int unsigned N    = pfc_pkg::ADC_N,
  parameter int unsigned SYNC = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmp_in,
  output logic         bitstream,
  output logic [N-1:0] dout,
  output logic [M-1:0] count
);

  logic [SYNC-1:0] sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[SYNC-2:0], cmp_in};
  end

  sd_updown_counter #(.M(M)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .up    (sync_q[SYNC-1]),
    .count (count)
  );

  sd_modulator #(.M(M)) u_mod (
    .clk       (clk),
    .rst_n     (rst_n),
    .din       (count),
    .bitstream (bitstream)
  );

  // Round the counter to N bits (saturating at the top code).
  localparam int unsigned SH = M - N;
  logic [N:0] rounded;

  always_comb begin
    if (SH == 0) rounded = {1'b0, count[M-1 -: N]};
    else         rounded = (N+1)'(({1'b0, count} + (M+1)'(2 ** SH / 2)) >> SH);
    dout = rounded[N] ? '1 : rounded[N-1:0];
  end

  initial begin
    assert (SYNC >= 2) else $error("sd_adc: SYNC must be at least 2");
    assert (N <= M)    else $error("sd_adc: N must not exceed M");
  end

endmodule
