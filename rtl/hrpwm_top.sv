// hrpwm_top: the two synchronous high-resolution PWM modulators side by side.
//
//   dcm_hrpwm      four quadrant phases of a clock manager (times R managers)
//                  retime the end-of-pulse strobe: step T/(4R), 625 ps with
//                  R = 1 and a 400 MHz clock on clk_dcm.
//   iodelay_hrpwm  an I/O delay line of 32 taps delays the end-of-pulse
//                  strobe: step 1/32 of the fast clock, 78.125 ps with a
//                  200 MHz board clock on clk_mmcm (fast clock 400 MHz).
//
// Each output has a DC_W-bit duty command, a period of 2^DC_W steps and a
// pulse of dc steps; a new command is applied at the next period boundary.
// The modulators share only the reset; each has its own board clock, as they
// target different device families. IOD_N sets the number of delay-line PWM
// outputs (one duty command each, one delay line each).
`timescale 1ns/1fs
module hrpwm_top #(
  parameter int unsigned DC_W  = 8,
  parameter int unsigned DCM_R = 1,
  parameter int unsigned IOD_N = 1
) (
  input  logic            clk_dcm,
  input  logic            clk_mmcm,
  input  logic            rst_n,
  input  logic [DC_W-1:0] dc_dcm,
  input  logic [IOD_N-1:0][DC_W-1:0] dc_iod,
  output logic            pwm_dcm,
  output logic [IOD_N-1:0] pwm_iod,
  output logic            locked_dcm,
  output logic            ready_iod
);

  dcm_hrpwm #(.DC_W(DC_W), .R(DCM_R)) u_dcm_pwm (
    .clk_in (clk_dcm), .rst_n (rst_n), .dc (dc_dcm),
    .pwm (pwm_dcm), .locked (locked_dcm)
  );

  iodelay_hrpwm #(.DC_W(DC_W), .NCH(IOD_N)) u_iod_pwm (
    .clk_in (clk_mmcm), .rst_n (rst_n), .dc (dc_iod),
    .pwm (pwm_iod), .ready (ready_iod)
  );

endmodule
