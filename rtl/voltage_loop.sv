// voltage_loop: outer output-voltage loop of the PFC.
//
// It sets the carrier amplitude Vm of the one-cycle current loop. In steady
// state Vm is proportional to the input power, P_in ~ Vm*Vin^2/(r_s*Vo), so
// a loop that raises Vm while the output voltage is below its reference
// regulates the output. The published method gives only this function; the
// controller here is a plain PI, this design's choice:
//
//   e      = vref - vo                       (signed)
//   integ += ki * e                          (clamped to 0 .. VM_MAX << I_SHIFT)
//   vm     = clamp((integ >> I_SHIFT) + kp * e, 0, VM_MAX)
//
// It is updated on `update` (once per switching period in this controller).
// The gains are inputs so that the loop can be tuned to the power stage; it
// has to be slow (far below the 100/120 Hz output ripple) so that the
// current reference stays sinusoidal.
//
// Interface: `vm` is registered and changes one clock after `update`.
// `sat_hi`/`sat_lo` flag that the last update clamped the output.
module voltage_loop #(
  parameter int unsigned W       = pfc_pkg::ADC_N,
  parameter int unsigned VM_W    = pfc_pkg::VM_W,
  parameter int unsigned G_W     = 8,
  parameter int unsigned I_SHIFT = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            update,
  input  logic [W-1:0]    vref,
  input  logic [W-1:0]    vo,
  input  logic [G_W-1:0]  kp,
  input  logic [G_W-1:0]  ki,
  output logic [VM_W-1:0] vm,
  output logic            sat_hi,
  output logic            sat_lo
);

  localparam int unsigned IW = VM_W + I_SHIFT + 2;
  localparam logic signed [IW-1:0] I_MAX = $signed({2'b00, {VM_W{1'b1}}, {I_SHIFT{1'b0}}});
  localparam logic signed [IW-1:0] V_MAX = $signed({{(I_SHIFT+2){1'b0}}, {VM_W{1'b1}}});

  logic signed [W:0]      err;
  logic signed [IW-1:0]   err_x, kp_x, ki_x;
  logic signed [IW-1:0]   integ, integ_next, p_term, out;

  always_comb begin
    err        = $signed({1'b0, vref}) - $signed({1'b0, vo});
    err_x      = IW'(err);
    kp_x       = $signed(IW'(kp));
    ki_x       = $signed(IW'(ki));
    integ_next = integ + err_x * ki_x;
    if (integ_next < 0)          integ_next = '0;
    else if (integ_next > I_MAX) integ_next = I_MAX;
    p_term     = err_x * kp_x;
    out        = (integ_next >>> I_SHIFT) + p_term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ  <= '0;
      vm     <= '0;
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
    end else if (!run) begin
      integ  <= '0;
      vm     <= '0;
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
    end else if (update) begin
      integ  <= integ_next;
      sat_hi <= (out > V_MAX);
      sat_lo <= (out < 0);
      if (out > V_MAX)  vm <= '1;
      else if (out < 0) vm <= '0;
      else              vm <= out[VM_W-1:0];
    end
  end

endmodule
