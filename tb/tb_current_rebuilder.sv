// tb_current_rebuilder: random switch pattern and voltages against an
// integer model of the accumulator (add vin while on, vin-vo while off,
// never below zero), then one full boost period with a known peak. The
// signed volt-seconds correction vs_comp is random and must be added exactly
// once per period, on the first clock after each turn-off.
module tb_current_rebuilder;
  localparam int unsigned W = 8, ACC_W = 16;
  logic clk = 0, rst_n = 0, clear = 0;
  pfc_pkg::sw_state_e sw = pfc_pkg::SW_OFF;
  logic [W-1:0] vin = '0, vo = '0;
  logic signed [15:0] vs_comp = '0;
  logic [ACC_W-1:0] acc;
  logic dcm;
  int checks = 0, failures = 0;
  longint model = 0;
  int n_dcm = 0, n_top = 0, n_corr = 0;
  bit prev_on = 0;

  current_rebuilder #(.W(W), .ACC_W(ACC_W)) dut (.clk, .rst_n, .clear, .sw, .vin, .vo, .vs_comp, .acc, .dcm);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic on, input int vi, input int vv, input logic clr);
    @(negedge clk);
    sw = on ? pfc_pkg::SW_ON : pfc_pkg::SW_OFF; vin = W'(vi); vo = W'(vv); clear = clr;
    @(posedge clk); #1;
    if (clr) model = 0;
    else begin
      model += on ? vi : vi - vv;
      if (prev_on && !on) begin
        model += longint'(vs_comp);
        if (vs_comp != 0) n_corr++;
      end
      if (model < 0) model = 0;
      if (model > (1 << ACC_W) - 1) begin model = (1 << ACC_W) - 1; n_top++; end
    end
    prev_on = on;
    checks++;
    if (longint'(acc) != model) begin
      failures++;
      $display("acc=%0d expected %0d", acc, model);
    end
    if (!on && model == 0) begin
      n_dcm++;
      checks++; if (!dcm) failures++;
    end
  endtask

  initial begin
    int t_on;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // One boost period: 40 clocks on at vin=100, then off at vo=200.
    for (int i = 0; i < 40; i++) step(1'b1, 100, 200, 1'b0);
    checks++; if (acc != 4000) failures++;
    for (int i = 0; i < 40; i++) step(1'b0, 100, 200, 1'b0);
    checks++; if (acc != 0) failures++;
    // The same period with a correction of +500 at the turn-off.
    vs_comp = 16'sd500;
    for (int i = 0; i < 40; i++) step(1'b1, 100, 200, 1'b0);
    step(1'b0, 100, 200, 1'b0);
    checks++; if (acc != 4400) failures++;
    for (int i = 0; i < 60; i++) step(1'b0, 100, 200, 1'b0);
    // Random operation.
    for (int i = 0; i < 20000; i++) begin
      if ((i % 200) == 0) begin
        t_on = int'($urandom_range(10, 190));
        vs_comp = ($urandom_range(0, 3) == 0) ? '0 : 16'($signed(int'($urandom_range(0, 8000)) - 4000));
      end
      step((i % 200) < t_on, int'($urandom_range(0, 255)), int'($urandom_range(150, 255)),
           ($urandom_range(0, 4000) == 0));
    end
    // Long on-time into the upper clamp.
    for (int i = 0; i < 400; i++) step(1'b1, 255, 255, 1'b0);
    checks++; if (n_dcm == 0 || n_top == 0 || n_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
