// pfc_pkg: constants and types shared by the sensorless PFC controller.
//
// The controller runs from one fast clock (100 MHz) and switches a boost
// converter at 73 kHz, so one switching period is 1370 clock cycles. Both
// line voltages are measured by sigma-delta converters with a 13-bit
// counter of which the 8 most significant bits are used. These numbers are
// the defaults of the module parameters; the widths of the internal
// current and carrier words are this design's own choice.
package pfc_pkg;

  // Clock and switching frequency of the reference design.
  localparam int unsigned CLK_HZ     = 100_000_000;
  localparam int unsigned FSW_HZ     = 73_000;
  // Switching period in clock cycles, rounded to the nearest integer.
  localparam int unsigned TS_CYCLES  = (CLK_HZ + FSW_HZ / 2) / FSW_HZ;

  // Sigma-delta ADC: counter width M and number of used MSBs N.
  localparam int unsigned ADC_M      = 13;
  localparam int unsigned ADC_N      = 8;

  // Rebuilt-current accumulator and carrier (Vm) widths.
  localparam int unsigned ACC_W      = 24;
  localparam int unsigned VM_W       = 16;
  // Right shift from accumulator units (code * cycles) to carrier units.
  localparam int unsigned RS_SHIFT   = 6;

  // Width of the delay-compensation cycle counts.
  localparam int unsigned DL_W       = 8;
  // Width of the signed volt-seconds correction added to the rebuilt
  // current once per switching period.
  localparam int unsigned VS_W       = 16;

  // Switch state as seen by the rebuilding accumulator.
  typedef enum logic {
    SW_OFF = 1'b0,
    SW_ON  = 1'b1
  } sw_state_e;

endpackage
