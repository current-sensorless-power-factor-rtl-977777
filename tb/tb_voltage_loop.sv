// tb_voltage_loop: random errors, gains and update strobes against an
// integer model of the clamped PI law; both output clamps must be reached,
// and `run` low must clear the loop.
module tb_voltage_loop;
  localparam int unsigned W = 8, VM_W = 16, G_W = 8, I_SHIFT = 8;
  logic clk = 0, rst_n = 0, run = 0, update = 0;
  logic [W-1:0] vref = '0, vo = '0;
  logic [G_W-1:0] kp = '0, ki = '0;
  logic [VM_W-1:0] vm;
  logic sat_hi, sat_lo;
  int checks = 0, failures = 0;
  longint integ = 0, out, vm_ref = 0;
  int n_hi = 0, n_lo = 0;
  bit hi_ref = 0, lo_ref = 0;

  voltage_loop #(.W(W), .VM_W(VM_W), .G_W(G_W), .I_SHIFT(I_SHIFT)) dut (
    .clk, .rst_n, .run, .update, .vref, .vo, .kp, .ki, .vm, .sat_hi, .sat_lo);

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit r, input bit u, input int e_bias);
    int e;
    @(negedge clk);
    run = r; update = u;
    vref = W'($urandom_range(100, 230));
    vo   = W'(int'(vref) - e_bias + int'($urandom_range(0, 20)) - 10);
    @(posedge clk); #1;
    if (!r) begin
      integ = 0; vm_ref = 0; hi_ref = 0; lo_ref = 0;
    end else if (u) begin
      e = int'(vref) - int'(vo);
      integ += longint'(e) * longint'(ki);
      if (integ < 0) integ = 0;
      if (integ > (longint'(65535) << I_SHIFT)) integ = longint'(65535) << I_SHIFT;
      out = (integ >>> I_SHIFT) + longint'(e) * longint'(kp);
      hi_ref = (out > 65535); lo_ref = (out < 0);
      vm_ref = hi_ref ? 65535 : lo_ref ? 0 : out;
      if (hi_ref) n_hi++;
      if (lo_ref) n_lo++;
    end
    checks++;
    if (longint'(vm) != vm_ref || sat_hi != hi_ref || sat_lo != lo_ref) begin
      failures++;
      $display("vm=%0d (hi %0d lo %0d) expected %0d (hi %0d lo %0d)", vm, sat_hi, sat_lo, vm_ref, hi_ref, lo_ref);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      kp = G_W'($urandom_range(0, 255));
      ki = G_W'($urandom_range(1, 255));
      // below reference: Vm climbs; above: Vm falls
      for (int i = 0; i < 600; i++) step(1'b1, $urandom_range(0, 2) == 0, (blk % 2) ? 60 : -60);
      if (blk == 20) repeat (3) step(1'b0, 1'b1, 0);
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("clamps reached: high %0d low %0d", n_hi, n_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
