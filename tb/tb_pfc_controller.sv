// tb_pfc_controller: closed-loop test of the whole controller at its
// default parameters (100 MHz clock, 1370-clock switching period, 13-bit
// ADCs of which 8 bits are used).
//
// The controller runs a behavioural boost stage (1 mH, 470 uF) through a
// gate driver with 620 ns turn-on and 920 ns turn-off delay, and measures it
// through two behavioural RC/comparator front ends. Two operating points are
// run in turn, 220 Vrms / 400 W and 75 Vrms / 135 W, both at 400 V output.
// In the last line cycles of each it checks:
//   - the output voltage is regulated to 400 V within 4 %;
//   - the power factor of the switching-period averaged line current is
//     above 0.90;
//   - the rebuilt current has the shape of the real inductor current: after
//     scaling its mean to the real mean, the mean absolute difference of the
//     period averages stays below 30 % (220 V) / 50 % (75 V) of the mean.
//     Its amplitude is not checked: the voltage loop absorbs any scale error
//     of the rebuilt current, including the inductance the scale assumes;
//   - with the lead times set to the driver delays, the real switch follows
//     the non-compensated drive in at least 97 % of the clocks.
// The rebuilder correction vs_comp is held at 0: the leads do the
// compensation.
// It counts the mechanisms of the design and fails if one never occurred:
// ADC up and down steps, extrapolated samples that differ from the plain
// sample, discontinuous conduction, periods in continuous conduction,
// early turn-on and early turn-off of the compensated drive, and the change
// of line voltage.
module tb_pfc_controller;
  localparam real   T_CLK   = 10.0e-9;
  localparam real   FS      = 450.0;     // divider: 450 V -> 3.3 V
  localparam real   L_H     = 1.0e-3;
  localparam int    TS      = pfc_pkg::TS_CYCLES;
  // rebuilt-current units per ampere: L / (V_LSB * T_clk), V_LSB = FS/256
  localparam real   ACC_PER_A = L_H / (FS / 256.0 * T_CLK);

  logic clk = 0, rst_n = 0;
  logic vin_cmp, vo_cmp, vin_bs, vo_bs, gate;
  logic run = 0, extrap_en = 1;
  logic signed [15:0] vs_comp = '0;
  logic [7:0] vref = 8'd227, kp = 8'd128, ki = 8'd32;
  logic [7:0] n_dlon_off = 8'd92, n_dloff_on = 8'd62;
  logic [7:0] vin_code, vo_code, vin_pred, vo_pred;
  logic [23:0] i_rebuilt;
  logic [15:0] vm;
  logic gate_ideal, period_start, dcm, early_on, early_off, vm_sat_hi, vm_sat_lo, pred_clamped;

  real vac_rms = 220.0, f_line = 50.0, r_load = 400.0, vo_init = 400.0;
  logic load_init = 1;
  logic sw;
  real vrect, il, vo, vin_adc, vo_adc, vf1, vf2;

  int checks = 0, failures = 0;

  pfc_controller dut (
    .clk, .rst_n, .vin_cmp, .vo_cmp, .vin_bs, .vo_bs, .gate,
    .run, .vref, .kp, .ki, .n_dlon_off, .n_dloff_on, .extrap_en, .vs_comp,
    .vin_code, .vo_code, .vin_pred, .vo_pred, .i_rebuilt, .vm, .gate_ideal,
    .period_start, .dcm, .early_on, .early_off, .vm_sat_hi, .vm_sat_lo, .pred_clamped);

  adc_rc_comparator afe_vin (.clk, .bitstream(vin_bs), .vin(vin_adc), .cmp(vin_cmp), .vfilt(vf1));
  adc_rc_comparator afe_vo  (.clk, .bitstream(vo_bs),  .vin(vo_adc),  .cmp(vo_cmp),  .vfilt(vf2));

  boost_plant #(.T_CLK(T_CLK), .L(L_H), .FS(FS)) plant (
    .clk, .drive(gate), .vac_rms, .f_line, .r_load, .vo_init, .load_init,
    .sw, .vrect, .il, .vo, .vin_adc, .vo_adc);

  always #5 clk = ~clk;

  initial begin
    #900ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters --------------------------------------------------
  int n_adc_up = 0, n_adc_dn = 0, n_pred_diff = 0, n_dcm = 0, n_ccm = 0;
  int n_early_on = 0, n_early_off = 0, n_line_change = 0;
  logic [7:0] vin_code_q = '0, vin_sample = '0;
  bit had_dcm = 0;

  always @(posedge clk) begin
    vin_code_q <= vin_code;
    if (run) begin
      if (vin_code > vin_code_q) n_adc_up++;
      if (vin_code < vin_code_q) n_adc_dn++;
      if (dcm) begin n_dcm++; had_dcm <= 1; end
      if (early_on) n_early_on++;
      if (early_off) n_early_off++;
      if (period_start) begin
        if (!had_dcm && i_rebuilt != 0) n_ccm++;
        had_dcm <= 0;
      end
      if (period_start) begin
        if (extrap_en && vin_pred != vin_sample) n_pred_diff++;
        vin_sample <= vin_code;          // what the extrapolator samples now
      end
    end
  end

  // ---- measurement window ---------------------------------------------------
  bit   measure = 0;
  real  p_il, p_irb, p_v;      // per-period sums
  real  s_p, s_v2, s_i2, s_i, s_vo, s_r;
  real  pa_i[$], pa_r[$];
  longint n_clk, n_sw_match, n_per;

  task automatic clear_window();
    s_p = 0; s_v2 = 0; s_i2 = 0; s_i = 0; s_vo = 0; s_r = 0;
    pa_i.delete(); pa_r.delete();
    n_clk = 0; n_sw_match = 0; n_per = 0;
  endtask

  initial begin
    p_il = 0; p_irb = 0; p_v = 0;
    clear_window();
  end

  always @(posedge clk) begin
    if (measure) begin
      p_il  += il;
      p_irb += real'(i_rebuilt) / ACC_PER_A;
      p_v   += vrect;
      s_vo  += vo;
      n_clk++;
      if (sw == gate_ideal) n_sw_match++;
      if (period_start) begin
        real ia, va, ra;
        ia = p_il / TS; va = p_v / TS; ra = p_irb / TS;
        s_p  += va * ia; s_v2 += va * va; s_i2 += ia * ia;
        s_i  += ia; s_r += ra;
        pa_i.push_back(ia); pa_r.push_back(ra);
        n_per++;
        p_il = 0; p_irb = 0; p_v = 0;
      end
    end else begin
      p_il = 0; p_irb = 0; p_v = 0;
    end
  end

  task automatic evaluate(input string name, input real max_shape_err);
    real pf, vo_avg, err_rel, match;
    pf      = s_p / $sqrt(s_v2 * s_i2);
    vo_avg  = s_vo / real'(n_clk);
    // shape error of the rebuilt current, its mean scaled to the real mean
    err_rel = 0.0;
    foreach (pa_i[k]) begin
      real d;
      d = pa_r[k] * s_i / s_r - pa_i[k];
      err_rel += (d < 0.0) ? -d : d;
    end
    err_rel = err_rel / s_i;
    match   = real'(n_sw_match) / real'(n_clk);
    $display("%s: Vo=%0.1f V  PF=%0.4f  P=%0.1f W  rebuilt error=%0.3f  switch match=%0.4f  Vm=%0d",
             name, vo_avg, pf, s_p / real'(n_per), err_rel, match, vm);
    checks++; if (vo_avg < 384.0 || vo_avg > 416.0) begin failures++; $display("  output voltage off"); end
    checks++; if (pf < 0.90) begin failures++; $display("  power factor low"); end
    checks++; if (err_rel > max_shape_err) begin failures++; $display("  rebuilt current off"); end
    checks++; if (match < 0.97) begin failures++; $display("  switch timing off"); end
  endtask

  task automatic run_ms(input int ms);
    for (int i = 0; i < ms; i++) begin
      repeat (100_000) @(posedge clk);
    end
  endtask

  task automatic progress(input int ms, input int step);
    for (int i = 0; i < ms / step; i++) begin
      run_ms(step);
      $display("  t=%0t Vo=%0.1f vo_code=%0d Vm=%0d il=%0.2f irb=%0.2f", $time, vo, vo_code, vm, il,
               real'(i_rebuilt) / ACC_PER_A);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (30_000) @(posedge clk);       // ADCs converge, output precharged
    @(negedge clk);
    load_init = 0;
    run = 1;
    // 220 Vrms, 400 W
    progress(200, 20);
    clear_window(); measure = 1;
    run_ms(40);
    measure = 0;
    evaluate("220 Vrms", 0.30);
    // line change: 75 Vrms, 135 W
    vac_rms = 75.0; r_load = 1185.0; n_line_change++;
    progress(300, 20);
    clear_window(); measure = 1;
    run_ms(40);
    measure = 0;
    evaluate("75 Vrms", 0.50);

    $display("mechanisms: adc up %0d down %0d, extrapolated %0d, dcm clocks %0d, ccm periods %0d, early on %0d, early off %0d, line changes %0d",
             n_adc_up, n_adc_dn, n_pred_diff, n_dcm, n_ccm, n_early_on, n_early_off, n_line_change);
    checks++; if (n_adc_up == 0 || n_adc_dn == 0) failures++;
    checks++; if (n_pred_diff == 0) failures++;
    checks++; if (n_dcm == 0) failures++;
    checks++; if (n_ccm == 0) failures++;
    checks++; if (n_early_on == 0) failures++;
    checks++; if (n_early_off == 0) failures++;
    checks++; if (n_line_change == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
