// boost_plant: behavioural model of the PFC power stage, used only in
// simulation: rectified sine source, gate driver with separate turn-on and
// turn-off delays, boost inductor, ideal diode and switch, output capacitor
// and resistive load. It also provides the two divided-down voltages that
// the ADC comparators see (equal divider ratios, FS volts -> VDD).
// Integration is forward Euler with one step per clock.
module boost_plant #(
  parameter real T_CLK    = 10.0e-9,
  parameter real L        = 1.0e-3,
  parameter real C        = 470.0e-6,
  parameter real FS       = 450.0,
  parameter real VDD      = 3.3,
  parameter int  DLY_ON   = 62,      // off-to-on driver delay, clocks
  parameter int  DLY_OFF  = 92       // on-to-off driver delay, clocks
) (
  input  logic clk,
  input  logic drive,
  input  real  vac_rms,
  input  real  f_line,
  input  real  r_load,
  input  real  vo_init,
  input  logic load_init,
  output logic sw,
  output real  vrect,
  output real  il,
  output real  vo,
  output real  vin_adc,
  output real  vo_adc
);

  localparam int HW = (DLY_ON > DLY_OFF) ? DLY_ON : DLY_OFF;
  logic [HW-1:0] hist = '0;
  real phase = 0.0;
  real ic;

  initial begin
    il = 0.0; vo = 0.0; vrect = 0.0; sw = 1'b0;
  end

  always @(posedge clk) begin
    real di, vr, phase_n;
    hist <= {hist[HW-2:0], drive};
    // A drive pulse [a, b) switches the transistor during [a+DLY_ON, b+DLY_OFF).
    sw   <= hist[DLY_ON-1] | hist[DLY_OFF-1];
    phase_n = phase + 2.0 * 3.14159265358979 * f_line * T_CLK;
    if (phase_n > 2.0 * 3.14159265358979) phase_n = phase_n - 2.0 * 3.14159265358979;
    phase <= phase_n;
    vr = vac_rms * 1.41421356 * $sin(phase);
    if (vr < 0.0) vr = -vr;
    vrect <= vr;
    if (load_init) begin
      vo <= vo_init;
      il <= 0.0;
    end else begin
      if (sw) begin
        di = vr / L * T_CLK;
        ic = -vo / r_load;
      end else if (il > 0.0 || vr > vo) begin
        di = (vr - vo) / L * T_CLK;
        ic = il - vo / r_load;
      end else begin
        di = 0.0;
        ic = -vo / r_load;
      end
      il <= (il + di < 0.0) ? 0.0 : il + di;
      vo <= vo + ic / C * T_CLK;
    end
  end

  assign vin_adc = vrect * VDD / FS;
  assign vo_adc  = vo * VDD / FS;

endmodule
