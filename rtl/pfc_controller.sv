// pfc_controller: digital power-factor-correction controller for a boost
// converter that needs no current sensor.
//
// Only the rectified input voltage and the output voltage are measured, each
// by a sigma-delta ADC whose analog part is just an external comparator and
// an RC filter (sd_adc). Once per switching period both readings are sampled
// and passed through a one-step linear predictor (linear_extrapolator) that
// cancels the sampling and register delays. The inductor current is then
// rebuilt inside the chip (current_rebuilder) from the two voltages and the
// switch state that the controller itself generates. A one-cycle current
// loop (one_cycle_ctrl) switches the transistor so that the peak of the
// rebuilt current follows the input voltage, and leads the drive signal by
// programmable numbers of clocks to cancel the driver delays. An outer loop
// (voltage_loop) sets the carrier amplitude Vm, i.e. the line power, so that
// the output voltage meets its reference.
//
// Structure and data flow follow the published block diagram; the PI form
// of the voltage loop, sampling once per period, the predictor on both
// voltages, the `run` enable and the observation outputs are this design's
// choices.
//
// Interface:
//   vin_cmp / vo_cmp    comparator outputs (1: voltage above filtered stream)
//   vin_bs  / vo_bs     bitstreams to the external RC filters
//   gate                compensated drive to the gate driver
//   run                 0 holds the switch off and clears both loops
//   vref, kp, ki        output-voltage reference (ADC code) and PI gains
//   n_dlon_off/n_dloff_on  drive lead in clocks for the two transitions
//   extrap_en           enables the linear prediction of the samples
//   vs_comp             signed volt-seconds correction added to the rebuilt
//                       current at each turn-off (0 when the leads suffice)
//   remaining outputs   internal signals for observation
module pfc_controller
#(
  parameter int unsigned M        = pfc_pkg::ADC_M,
  parameter int unsigned N        = pfc_pkg::ADC_N,
  parameter int unsigned TS       = pfc_pkg::TS_CYCLES,
  parameter int unsigned ACC_W    = pfc_pkg::ACC_W,
  parameter int unsigned VM_W     = pfc_pkg::VM_W,
  parameter int unsigned RS_SHIFT = pfc_pkg::RS_SHIFT,
  parameter int unsigned DL_W     = pfc_pkg::DL_W,
  parameter int unsigned VS_W     = pfc_pkg::VS_W,
  parameter int unsigned G_W      = 8,
  parameter int unsigned I_SHIFT  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // ADC pins
  input  logic             vin_cmp,
  input  logic             vo_cmp,
  output logic             vin_bs,
  output logic             vo_bs,
  // gate driver pin
  output logic             gate,
  // configuration
  input  logic             run,
  input  logic [N-1:0]     vref,
  input  logic [G_W-1:0]   kp,
  input  logic [G_W-1:0]   ki,
  input  logic [DL_W-1:0]  n_dlon_off,
  input  logic [DL_W-1:0]  n_dloff_on,
  input  logic             extrap_en,
  input  logic signed [VS_W-1:0] vs_comp,
  // observation
  output logic [N-1:0]     vin_code,
  output logic [N-1:0]     vo_code,
  output logic [N-1:0]     vin_pred,
  output logic [N-1:0]     vo_pred,
  output logic [ACC_W-1:0] i_rebuilt,
  output logic [VM_W-1:0]  vm,
  output logic             gate_ideal,
  output logic             period_start,
  output logic             dcm,
  output logic             early_on,
  output logic             early_off,
  output logic             vm_sat_hi,
  output logic             vm_sat_lo,
  output logic             pred_clamped
);

  pfc_pkg::sw_state_e    sw;
  logic         vin_clamped, vo_clamped;

  sd_adc #(.M(M), .N(N)) u_adc_vin (
    .clk (clk), .rst_n (rst_n),
    .cmp_in (vin_cmp), .bitstream (vin_bs), .dout (vin_code), .count ()
  );

  sd_adc #(.M(M), .N(N)) u_adc_vo (
    .clk (clk), .rst_n (rst_n),
    .cmp_in (vo_cmp), .bitstream (vo_bs), .dout (vo_code), .count ()
  );

  linear_extrapolator #(.W(N)) u_ext_vin (
    .clk (clk), .rst_n (rst_n),
    .sample_en (period_start), .extrap_en (extrap_en),
    .din (vin_code), .dout (vin_pred), .clamped (vin_clamped)
  );

  linear_extrapolator #(.W(N)) u_ext_vo (
    .clk (clk), .rst_n (rst_n),
    .sample_en (period_start), .extrap_en (extrap_en),
    .din (vo_code), .dout (vo_pred), .clamped (vo_clamped)
  );

  assign pred_clamped = vin_clamped | vo_clamped;

  current_rebuilder #(.W(N), .ACC_W(ACC_W), .VS_W(VS_W)) u_rebuild (
    .clk (clk), .rst_n (rst_n),
    .clear (!run), .sw (sw),
    .vin (vin_pred), .vo (vo_pred), .vs_comp (vs_comp),
    .acc (i_rebuilt), .dcm (dcm)
  );

  voltage_loop #(.W(N), .VM_W(VM_W), .G_W(G_W), .I_SHIFT(I_SHIFT)) u_vloop (
    .clk (clk), .rst_n (rst_n),
    .run (run), .update (period_start),
    .vref (vref), .vo (vo_code), .kp (kp), .ki (ki),
    .vm (vm), .sat_hi (vm_sat_hi), .sat_lo (vm_sat_lo)
  );

  one_cycle_ctrl #(
    .TS (TS), .W (N), .ACC_W (ACC_W), .VM_W (VM_W),
    .RS_SHIFT (RS_SHIFT), .DL_W (DL_W)
  ) u_occ (
    .clk (clk), .rst_n (rst_n), .run (run),
    .vm (vm), .acc (i_rebuilt), .vin (vin_pred),
    .n_on_off (n_dlon_off), .n_off_on (n_dloff_on),
    .gate_ideal (sw), .gate_drive (gate),
    .period_start (period_start), .cnt (),
    .early_off (early_off), .early_on (early_on)
  );

  assign gate_ideal = (sw == pfc_pkg::SW_ON);

endmodule
