// tb_one_cycle_ctrl: the controller drives a boost-current model in the
// testbench (the same accumulator law as the rebuilder) and is checked
// clock by clock against a reference that evaluates the one-cycle law
// Vm*(1 - t/Ts) <= i directly by multiplication. Vm, the voltages and the
// two lead times change at random. It also checks that the compensated
// drive falls n_on_off clocks (+/-1 for rounding) before the ideal one, and
// rises n_off_on clocks before the period boundary.
module tb_one_cycle_ctrl;
  localparam int unsigned TS = pfc_pkg::TS_CYCLES, W = 8, ACC_W = 24, VM_W = 16, RS = 6, DL_W = 8;
  logic clk = 0, rst_n = 0, run = 0;
  logic [VM_W-1:0] vm = '0;
  logic [ACC_W-1:0] acc;
  logic [W-1:0] vin = '0, vo = '0;
  logic [DL_W-1:0] n_on_off = '0, n_off_on = '0;
  pfc_pkg::sw_state_e gate_ideal;
  logic gate_drive, period_start, early_off, early_on;
  logic [$clog2(TS)-1:0] cnt;
  int checks = 0, failures = 0;

  one_cycle_ctrl #(.TS(TS), .W(W), .ACC_W(ACC_W), .VM_W(VM_W), .RS_SHIFT(RS), .DL_W(DL_W)) dut (
    .clk, .rst_n, .run, .vm, .acc, .vin, .n_on_off, .n_off_on,
    .gate_ideal, .gate_drive, .period_start, .cnt, .early_off, .early_on);

  always #5 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inductor-current model driven by the ideal gate.
  longint i_acc = 0;
  assign acc = ACC_W'(i_acc);
  always @(posedge clk) begin
    if (!run) i_acc <= 0;
    else begin
      longint nx;
      nx = i_acc + (gate_ideal == pfc_pkg::SW_ON ? longint'(vin) : longint'(vin) - longint'(vo));
      i_acc <= (nx < 0) ? 0 : nx;
    end
  end

  // Reference model.
  int  r_cnt = 0;
  longint r_vm = 0, r_n = 0;
  bit  r_ideal = 0, r_drive = 0;
  int  n_early_on = 0, n_early_off = 0, n_lead_ok = 0, n_lead_bad = 0;
  int  fall_ideal = -1, fall_drive = -1;

  always @(posedge clk) begin
    if (!rst_n || !run) begin
      r_cnt <= 0; r_vm <= 0; r_n <= 0; r_ideal <= 0; r_drive <= 0;
    end else begin
      longint ramp, ramp_p, ir, ir_p;
      bit c_ideal, c_pred, wrap, onp;
      int on_cnt;
      wrap   = (r_cnt == TS - 1);
      ramp   = r_vm * longint'(TS - r_cnt);
      ramp_p = ramp - r_vm * r_n;
      if (ramp_p < 0) ramp_p = 0;
      ir     = (i_acc >> RS) * TS;
      ir_p   = ((i_acc + r_n * longint'(vin)) >> RS) * TS;
      c_ideal = (ramp <= ir);
      c_pred  = (ramp_p <= ir_p);
      on_cnt  = (int'(n_off_on) >= TS - 1) ? 0 : TS - 1 - int'(n_off_on);
      onp     = (r_cnt == on_cnt) && (vm != 0);
      r_cnt <= wrap ? 0 : r_cnt + 1;
      if (wrap) r_vm <= longint'(vm);
      if (wrap) r_n <= longint'(n_on_off);
      if (wrap) r_ideal <= (vm != 0);
      else if (r_ideal && c_ideal) r_ideal <= 0;
      if (onp) r_drive <= 1;
      else if (r_drive && r_ideal && (r_cnt < on_cnt || n_off_on == 0) && (c_pred || c_ideal)) r_drive <= 0;
    end
  end

  // Compare and measure leads.
  always @(negedge clk) begin
    if (rst_n && run) begin
      checks++;
      if ((gate_ideal == pfc_pkg::SW_ON) != r_ideal || gate_drive != r_drive || int'(cnt) != r_cnt) begin
        failures++;
        if (failures < 10)
          $display("t=%0t cnt=%0d/%0d ideal=%0d/%0d drive=%0d/%0d", $time, cnt, r_cnt,
                   gate_ideal, r_ideal, gate_drive, r_drive);
      end
      if (early_on) n_early_on++;
      if (early_off) n_early_off++;
    end
  end

  logic prev_ideal = 0, prev_drive = 0;
  always @(posedge clk) begin
    prev_ideal <= (gate_ideal == pfc_pkg::SW_ON);
    prev_drive <= gate_drive;
    if (run && cnt == 0) begin fall_ideal <= -1; fall_drive <= -1; end
    if (run && prev_drive && !gate_drive && cnt != 0) fall_drive <= int'(cnt);
    if (run && prev_ideal && gate_ideal == pfc_pkg::SW_OFF && cnt != 0) begin
      // ideal fell this clock: compare with the drive's fall in this period
      if (int'(cnt) > 3 * int'(n_on_off) && fall_drive >= 0) begin
        if ((int'(cnt) - fall_drive) >= int'(n_on_off) - 1 && (int'(cnt) - fall_drive) <= int'(n_on_off) + 1)
          n_lead_ok++;
        else n_lead_bad++;
      end
    end
    // rising edge of the drive: n_off_on clocks before the boundary
    if (run && !prev_drive && gate_drive && cnt != 0) begin
      checks++;
      if (TS - int'(cnt) != int'(n_off_on)) begin
        failures++;
        $display("drive rose at cnt=%0d, lead %0d", cnt, n_off_on);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    for (int p = 0; p < 300; p++) begin
      if (p % 20 == 0) begin
        vin = W'($urandom_range(20, 250));
        vo  = W'($urandom_range(int'(vin) + 5, 255));
        vm  = VM_W'($urandom_range(0, 30000));
        if (p % 60 == 0) vm = '0;
        n_on_off = DL_W'($urandom_range(0, 120));
        n_off_on = DL_W'($urandom_range(0, 90));
      end
      repeat (TS / 2) @(negedge clk);
      if ($urandom_range(0, 3) == 0) vm = VM_W'($urandom_range(0, 30000));  // mid-period change
      repeat (TS - TS / 2) @(negedge clk);
      if (p == 150) begin run = 0; repeat (5) @(negedge clk); run = 1; end
    end
    checks++;
    if (n_early_on == 0 || n_early_off == 0) begin
      failures++;
      $display("early turn-on %0d, early turn-off %0d", n_early_on, n_early_off);
    end
    checks++;
    if (n_lead_ok == 0 || n_lead_bad > n_lead_ok / 10) begin
      failures++;
      $display("turn-off lead as programmed: %0d periods, off by more: %0d", n_lead_ok, n_lead_bad);
    end
    $display("early on %0d, early off %0d, lead ok %0d bad %0d", n_early_on, n_early_off, n_lead_ok, n_lead_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
