// current_rebuilder: digital estimate of the boost inductor current.
//
// The controller generates the switch drive itself, so it knows when the
// switch is on. While on, the inductor current rises in proportion to vin;
// while off, it changes in proportion to vin - vo (it falls, since vo > vin).
// A single accumulator adds vin or vin - vo every clock and so holds the
// current in units of (voltage code x clock cycles); one unit equals
// V_LSB * T_clk / L amperes. Since the update rate is the clock, the PWM
// resolution is one clock cycle.
//
// The diode of the boost stops the current at zero, so the accumulator is
// clamped at 0 while the switch is off: this is discontinuous conduction,
// which the converter enters near every line zero crossing and which clears
// any accumulated rebuilding error. The clamp at the top of the range and
// `clear` are this design's choices. Both voltages must use the same scale
// (same divider ratio and ADC full scale).
//
// A known, repeatable difference between the volt-seconds the inductor
// really gets and those the accumulator counts (unequal driver delays, an
// offset in a measured voltage) can be cancelled here with one signed
// number: `vs_comp` is added once per switching period, on the first clock
// after the switch turns off, in the accumulator's own units. A driver that
// stretches the on-time by d clocks, for example, needs d * vo. Correcting
// the rebuilt current with a single variable follows the published method;
// adding it at the turn-off edge is this design's choice. Tie it to zero
// when the drive leads of one_cycle_ctrl already cancel the delays.
//
// Interface: `sw` is the switch state (the non-compensated drive, which the
// real switch follows after the driver delay); `acc` is registered. `dcm` is
// high while the switch is off and the estimate sits at zero.
module current_rebuilder
#(
  parameter int unsigned W     = pfc_pkg::ADC_N,
  parameter int unsigned ACC_W = pfc_pkg::ACC_W,
  parameter int unsigned VS_W  = pfc_pkg::VS_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  pfc_pkg::sw_state_e        sw,
  input  logic [W-1:0]     vin,
  input  logic [W-1:0]     vo,
  input  logic signed [VS_W-1:0] vs_comp,
  output logic [ACC_W-1:0] acc,
  output logic             dcm
);

  localparam logic signed [ACC_W+1:0] ACC_MAX = $signed({2'b00, {ACC_W{1'b1}}});

  initial assert (VS_W <= ACC_W && W < ACC_W) else $error("VS_W and W must be below ACC_W");

  logic signed [W+1:0]     slope;
  logic signed [ACC_W+1:0] corr;
  logic signed [ACC_W+1:0] next;
  pfc_pkg::sw_state_e      sw_q;
  logic                    turn_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sw_q <= pfc_pkg::SW_OFF;
    else        sw_q <= sw;
  end

  assign turn_off = (sw_q == pfc_pkg::SW_ON) && (sw == pfc_pkg::SW_OFF);

  always_comb begin
    if (sw == pfc_pkg::SW_ON) slope = $signed({2'b00, vin});
    else             slope = $signed({2'b00, vin}) - $signed({2'b00, vo});
    corr = turn_off ? {{(ACC_W+2-VS_W){vs_comp[VS_W-1]}}, vs_comp} : '0;
    next = $signed({2'b00, acc}) + {{(ACC_W-W){slope[W+1]}}, slope} + corr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (clear) begin
      acc <= '0;
    end else if (next < 0) begin
      acc <= '0;
    end else if (next > ACC_MAX) begin
      acc <= '1;
    end else begin
      acc <= next[ACC_W-1:0];
    end
  end

  assign dcm = (sw == pfc_pkg::SW_OFF) && (acc == '0);

endmodule
