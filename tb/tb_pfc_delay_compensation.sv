// tb_pfc_delay_compensation: what the drive leads of the one-cycle
// controller buy in closed loop.
//
// Same setup as tb_pfc_controller (default parameters, 1 mH / 470 uF boost
// stage, 620 ns turn-on and 920 ns turn-off driver delay, 220 Vrms / 400 W,
// 400 V output). The controller is run four times from the same start:
//   A. leads set to the driver delays (92 / 62 clocks), prediction on;
//   B. leads at zero, i.e. the drive is not compensated;
//   C. leads set, prediction off;
//   D. leads at zero, but the rebuilder adds the known volt-seconds
//      difference instead: (920 - 620) ns = 30 clocks times the output
//      code 227, i.e. vs_comp = 6810 once per period.
// Each run settles for 150 ms and is measured over the next 40 ms.
// Checked:
//   - A: the real switch follows the non-compensated drive in >= 97 % of the
//     clocks, PF >= 0.90, output within 4 % of 400 V;
//   - B: the switch match falls below 93 %, because the unequal delays
//     stretch every on-time by 300 ns;
//   - B: the rebuilt current departs further from the real one than in A
//     (its shape error, mean scaled to the real mean, is larger), which is
//     the accumulated volt-seconds error the leads exist to remove;
//   - C: runs and regulates (output within 4 %); its numbers are printed;
//   - D: PF at least 0.2 above B and a rebuilt-current error at most 60 %
//     of B's. The correction fixes the rebuilt current's bookkeeping but not
//     the switch timing, so D is expected to stay behind A.
// The thresholds and the comparison are this design's own; the delays are
// those measured on the prototype the method was demonstrated on.
module tb_pfc_delay_compensation;
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
  // run D: on-time stretched by (92 - 62) clocks, vref code 227
  localparam logic signed [15:0] VS_D = 16'sd6810;

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
                         input logic pred, input logic signed [15:0] vs, output real pf, output real vo_avg, output real err,
                         output real match);
    @(negedge clk);
    run = 0; load_init = 1; rst_n = 0;
    n_dlon_off = lead_off; n_dloff_on = lead_on; extrap_en = pred; vs_comp = vs;
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

  initial begin
    real pf_a, vo_a, err_a, m_a, pf_b, vo_b, err_b, m_b, pf_c, vo_c, err_c, m_c;
    real pf_d, vo_d, err_d, m_d;
    one_run("A leads 92/62, prediction on ", 8'd92, 8'd62, 1'b1, 16'sd0, pf_a, vo_a, err_a, m_a);
    one_run("B leads 0/0,   prediction on ", 8'd0,  8'd0,  1'b1, 16'sd0, pf_b, vo_b, err_b, m_b);
    one_run("C leads 92/62, prediction off", 8'd92, 8'd62, 1'b0, 16'sd0, pf_c, vo_c, err_c, m_c);
    one_run("D leads 0/0,   vs_comp 6810  ", 8'd0,  8'd0,  1'b1, VS_D,   pf_d, vo_d, err_d, m_d);
    checks++; if (m_a < 0.97) begin failures++; $display("  A: switch timing off"); end
    checks++; if (pf_a < 0.90) begin failures++; $display("  A: power factor low"); end
    checks++; if (vo_a < 384.0 || vo_a > 416.0) begin failures++; $display("  A: output voltage off"); end
    checks++; if (m_b > 0.93) begin failures++; $display("  B: switch still follows the ideal drive"); end
    checks++; if (err_b <= err_a) begin failures++; $display("  B: rebuilt current not worse without leads"); end
    checks++; if (vo_c < 384.0 || vo_c > 416.0) begin failures++; $display("  C: output voltage off"); end
    checks++; if (pf_d < pf_b + 0.2) begin failures++; $display("  D: power factor not clearly above B"); end
    checks++; if (err_d > 0.6 * err_b) begin failures++; $display("  D: correction does not improve the rebuilt current"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
