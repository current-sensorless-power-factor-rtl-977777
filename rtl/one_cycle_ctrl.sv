// one_cycle_ctrl: input current loop of the PFC, a digital one-cycle
// controller with compensation of the gate-drive delays.
//
// A period counter splits time into switching periods of TS clocks. The
// carrier falls linearly from Vm at the start of a period to zero at its end,
// Vm - Vm*t/Ts. The switch turns on at the start of the period and turns off
// when the carrier meets the rebuilt current r_s*i_L; so Vm*(1-d) = r_s*i_pk,
// and in steady state the peak current follows vin (power factor correction).
// The carrier is scaled by TS to stay an integer: a register `ramp` holds
// Vm*(TS-t), loaded with Vm*TS at the period start and reduced by Vm every
// clock, and the turn-off test is ramp <= (acc >> RS_SHIFT) * TS. Vm and
// n_on_off are taken once per period, at its start.
//
// Two drive signals are produced. `gate_ideal` is the non-compensated one
// that the power switch should follow; it also drives the current
// rebuilder. `gate_drive` goes to the gate driver and leads it to cancel the
// driver and switch delays: it turns off n_on_off clocks before the turn-off
// condition is reached, and turns on n_off_on clocks before the carrier
// reaches zero. The early turn-off is found by testing the condition n_on_off
// clocks ahead: the carrier then is ramp - n_on_off*Vm and the rebuilt
// current, rising by vin per clock while on, is acc + n_on_off*vin. If that
// prediction never fires, the drive turns off with the ideal signal at the
// latest. The look-ahead rule, the 1-cycle decision latency, no turn-on in a
// period whose Vm is zero, and the absence of duty limits are this design's
// choices.
//
// Timing: `cnt` counts 0..TS-1; `period_start` is high for the clock in
// which cnt is 0. Both gates are registered; a condition seen in cycle k
// changes the gate in cycle k+1.
module one_cycle_ctrl
#(
  parameter int unsigned TS       = pfc_pkg::TS_CYCLES,
  parameter int unsigned W        = pfc_pkg::ADC_N,
  parameter int unsigned ACC_W    = pfc_pkg::ACC_W,
  parameter int unsigned VM_W     = pfc_pkg::VM_W,
  parameter int unsigned RS_SHIFT = pfc_pkg::RS_SHIFT,
  parameter int unsigned DL_W     = pfc_pkg::DL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [VM_W-1:0]   vm,
  input  logic [ACC_W-1:0]  acc,
  input  logic [W-1:0]      vin,
  input  logic [DL_W-1:0]   n_on_off,
  input  logic [DL_W-1:0]   n_off_on,
  output pfc_pkg::sw_state_e         gate_ideal,
  output logic              gate_drive,
  output logic              period_start,
  output logic [$clog2(TS)-1:0] cnt,
  output logic              early_off,
  output logic              early_on
);

  localparam int unsigned TSW  = $clog2(TS + 1);
  localparam int unsigned IRW  = ACC_W + 1 - RS_SHIFT;
  localparam int unsigned RW   = VM_W + TSW;
  localparam int unsigned CW   = ((RW > IRW + TSW) ? RW : IRW + TSW) + 1;
  localparam logic [$clog2(TS)-1:0] LAST = $clog2(TS)'(TS - 1);

  logic [VM_W-1:0] vm_q;
  logic [DL_W-1:0] n_on_off_q; // turn-off lead, fixed for the period
  logic [CW-1:0]   ramp;       // Vm * (TS - cnt)
  logic [CW-1:0]   ramp_lead;  // n_on_off * Vm, fixed for the period
  logic [CW-1:0]   ramp_pred, ir_ts, ir_pred_ts;
  logic [ACC_W:0]  acc_pred;
  logic            cond_ideal, cond_pred;
  logic            wrap, on_point, before_on;
  logic [TSW-1:0]  on_cnt;

  assign wrap         = (cnt == LAST);
  assign period_start = (cnt == '0);

  // Clock count in which the compensated drive is switched on (it is then
  // high from the following clock, n_off_on clocks before the period ends).
  always_comb begin
    if (TSW'(n_off_on) >= TSW'(TS - 1)) on_cnt = '0;
    else                                on_cnt = TSW'(TS - 1) - TSW'(n_off_on);
  end
  assign on_point  = (TSW'(cnt) == on_cnt) && (vm != '0);
  // Turn-off decisions belong to the part of the period before the early
  // turn-on point; after it the drive already serves the next period.
  assign before_on = (TSW'(cnt) < on_cnt) || (n_off_on == '0);

  always_comb begin
    ir_ts      = CW'(acc >> RS_SHIFT) * CW'(TS);
    acc_pred   = {1'b0, acc} + (ACC_W+1)'(n_on_off_q) * (ACC_W+1)'(vin);
    ir_pred_ts = CW'(acc_pred >> RS_SHIFT) * CW'(TS);
    ramp_pred  = (ramp > ramp_lead) ? ramp - ramp_lead : '0;
    cond_ideal = (ramp <= ir_ts);
    cond_pred  = (ramp_pred <= ir_pred_ts);
  end

  // Period counter and carrier.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      vm_q       <= '0;
      n_on_off_q <= '0;
      ramp       <= '0;
      ramp_lead  <= '0;
    end else if (!run) begin
      cnt        <= '0;
      vm_q       <= '0;
      n_on_off_q <= '0;
      ramp       <= '0;
      ramp_lead  <= '0;
    end else if (wrap) begin
      cnt        <= '0;
      vm_q       <= vm;
      n_on_off_q <= n_on_off;
      ramp       <= CW'(vm) * CW'(TS);
      ramp_lead  <= CW'(vm) * CW'(n_on_off);
    end else begin
      cnt  <= cnt + 1'b1;
      ramp <= ramp - CW'(vm_q);
    end
  end

  // Non-compensated drive: on at the period boundary, off at condition (2).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_ideal <= pfc_pkg::SW_OFF;
    end else if (!run) begin
      gate_ideal <= pfc_pkg::SW_OFF;
    end else if (wrap) begin
      gate_ideal <= (vm != '0) ? pfc_pkg::SW_ON : pfc_pkg::SW_OFF;
    end else if (gate_ideal == pfc_pkg::SW_ON && cond_ideal) begin
      gate_ideal <= pfc_pkg::SW_OFF;
    end
  end

  // Compensated drive: leads the ideal one by n_off_on / n_on_off clocks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_drive <= 1'b0;
      early_on   <= 1'b0;
      early_off  <= 1'b0;
    end else begin
      early_on  <= 1'b0;
      early_off <= 1'b0;
      if (!run) begin
        gate_drive <= 1'b0;
      end else if (on_point) begin
        gate_drive <= 1'b1;
        early_on   <= !gate_drive && !wrap;
      end else if (gate_drive && gate_ideal == pfc_pkg::SW_ON && before_on &&
                   (cond_pred || cond_ideal)) begin
        gate_drive <= 1'b0;
        early_off  <= !cond_ideal;
      end
    end
  end

  // The carrier reaches Vm*1 in the last clock of every period.
  a_carrier_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (run && wrap && vm_q != '0) |-> (ramp == CW'(vm_q)))
    else $error("one_cycle_ctrl: carrier out of step");

endmodule
