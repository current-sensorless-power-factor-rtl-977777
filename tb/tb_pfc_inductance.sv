// tb_pfc_inductance: the controller with an inductor 20 % below the value
// the current scale was worked out for.
//
// The rebuilder never uses the inductance: it counts volt-seconds, and one
// of its units is V_LSB * T_clk / L amperes. A different L only scales the
// rebuilt current, and the voltage loop absorbs the scale through Vm. This
// test runs 220 Vrms, 50 Hz, 400 W, 400 V output, with a 0.8 mH inductor in
// the behavioural boost stage instead of 1 mH. Otherwise the setup is the
// same as in tb_pfc_controller: default parameters, 470 uF, 620 ns / 920 ns
// driver delays with matching leads, behavioural RC/comparator front ends.
// It settles for 150 ms and is measured over the next 40 ms. Checked:
// output within 4 % of 400 V, PF >= 0.90, real switch follows the
// non-compensated drive in >= 97 % of the clocks, input power >= 360 W, Vm
// never at its upper limit, and the rebuilt-current shape error (mean scaled
// to the real mean) below 35 %. The tolerance and thresholds are this
// design's own choice.
module tb_pfc_inductance;
  localparam real   T_CLK   = 10.0e-9;
  localparam real   FS      = 450.0;     // divider: 450 V -> 3.3 V
  localparam real   L_H     = 1.0e-3;     // value the current scale assumes
  localparam real   L_PLANT = 0.8e-3;     // inductor actually fitted
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

  boost_plant #(.T_CLK(T_CLK), .L(L_PLANT), .FS(FS)) plant (
    .clk, .drive(gate), .vac_rms, .f_line, .r_load, .vo_init, .load_init,
    .sw, .vrect, .il, .vo, .vin_adc, .vo_adc);

  always #5 clk = ~clk;

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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


  task automatic result(output real pf, output real vo_avg, output real err_rel, output real match);
    pf      = s_p / $sqrt(s_v2 * s_i2);
    vo_avg  = s_vo / real'(n_clk);
    err_rel = 0.0;
    foreach (pa_i[k]) begin
      real d;
      d = pa_r[k] * s_i / s_r - pa_i[k];
      err_rel += (d < 0.0) ? -d : d;
    end
    err_rel = err_rel / s_i;
    match   = real'(n_sw_match) / real'(n_clk);
  endtask

  task automatic run_ms(input int ms);
    for (int i = 0; i < ms; i++) repeat (100_000) @(posedge clk);
  endtask

  task automatic one_run(input string name, input logic [7:0] lead_off, input logic [7:0] lead_on,
                         input logic pred, output real pf, output real vo_avg, output real err,
                         output real match);
    @(negedge clk);
    run = 0; load_init = 1; rst_n = 0;
    n_dlon_off = lead_off; n_dloff_on = lead_on; extrap_en = pred;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (30_000) @(posedge clk);
    @(negedge clk);
    load_init = 0;
    run = 1;
    run_ms(150);
    clear_window(); measure = 1;
    run_ms(40);
    measure = 0;
    result(pf, vo_avg, err, match);
    $display("%s: Vo=%0.1f V  PF=%0.4f  rebuilt error=%0.3f  switch match=%0.4f  Vm=%0d",
             name, vo_avg, pf, err, match, vm);
  endtask

  int n_sat = 0;
  always @(posedge clk) if (measure && vm_sat_hi) n_sat++;

  initial begin
    real pf, vo_avg, err, match;
    one_run("220 Vrms 50 Hz 400 W, L = 0.8 mH", 8'd92, 8'd62, 1'b1, pf, vo_avg, err, match);
    $display("  P=%0.1f W  Vm saturated for %0d clocks", s_p / real'(n_per), n_sat);
    checks++; if (vo_avg < 384.0 || vo_avg > 416.0) begin failures++; $display("  output voltage off"); end
    checks++; if (pf < 0.90) begin failures++; $display("  power factor low"); end
    checks++; if (match < 0.97) begin failures++; $display("  switch timing off"); end
    checks++; if (s_p / real'(n_per) < 360.0) begin failures++; $display("  power too low"); end
    checks++; if (n_sat != 0) begin failures++; $display("  carrier amplitude at its limit"); end
    checks++; if (err > 0.35) begin failures++; $display("  rebuilt current off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
