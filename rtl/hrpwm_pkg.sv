// hrpwm_pkg: types shared by the high-resolution PWM modulators and the
// clock/delay primitive models they use.
//
// iodelay_mode_e lists the three tap-selection modes of the I/O delay
// element: FIXED (tap set by a parameter), VARIABLE (CE/INC step the tap,
// RST returns it to INIT_TAP) and VAR_LOADABLE (as VARIABLE, but RST loads
// the 5-bit CNTVALUEIN). The modulator uses VAR_LOADABLE.
`timescale 1ns/1fs
package hrpwm_pkg;

  typedef enum logic [1:0] {
    IOD_FIXED        = 2'd0,
    IOD_VARIABLE     = 2'd1,
    IOD_VAR_LOADABLE = 2'd2
  } iodelay_mode_e;

  // Taps of the I/O delay element; the tap count is a 5-bit value.
  localparam int unsigned IOD_TAP_W = 5;

endpackage
