// iodelaye1: behavioural model of the Virtex-6 I/O delay element (not
// synthesizable; the real part is a calibrated vendor I/O primitive).
//
// DATAOUT repeats DATAIN delayed by tap * TAP_NS, tap in 0..31. The tap is
// chosen by MODE:
//   IOD_FIXED         tap = INIT_TAP, inputs ignored
//   IOD_VARIABLE      on a rising edge of C: RST -> INIT_TAP, else CE steps
//                     the tap up (INC = 1) or down, wrapping around 0/31
//   IOD_VAR_LOADABLE  as IOD_VARIABLE, but RST loads CNTVALUEIN
// CNTVALUEOUT shows the current tap. A new tap takes effect just after the C
// edge that loads it: a DATAIN edge launched by that same C edge is still
// delayed by the old tap. Each DATAIN edge keeps the delay it entered with.
//
// The default tap of 78.125 ps is the tap of a delay line calibrated by a
// 200 MHz reference (32 taps over half a 200 MHz period). Intrinsic
// (tap 0) delay is taken as zero.
`timescale 1ns/1fs
module iodelaye1
  import hrpwm_pkg::*;
#(
  parameter iodelay_mode_e MODE     = IOD_VAR_LOADABLE,
  parameter int unsigned   INIT_TAP = 0,
  parameter real           TAP_NS   = 0.078125
) (
  input  logic                 C,
  input  logic                 RST,
  input  logic                 CE,
  input  logic                 INC,
  input  logic [IOD_TAP_W-1:0] CNTVALUEIN,
  input  logic                 DATAIN,
  output logic                 DATAOUT,
  output logic [IOD_TAP_W-1:0] CNTVALUEOUT
);

  localparam realtime UPD_NS = 0.001;   // tap update 1 ps after the C edge

  logic [IOD_TAP_W-1:0] tap = IOD_TAP_W'(INIT_TAP);

  initial DATAOUT = 1'b0;

  always @(posedge C) begin
    if (MODE != IOD_FIXED) begin
      if (RST)
        tap <= #(UPD_NS) ((MODE == IOD_VAR_LOADABLE) ? CNTVALUEIN : IOD_TAP_W'(INIT_TAP));
      else if (CE)
        tap <= #(UPD_NS) (INC ? tap + 1'b1 : tap - 1'b1);
    end
  end

  always @(DATAIN) DATAOUT <= #(real'(tap) * TAP_NS) DATAIN;

  assign CNTVALUEOUT = tap;

endmodule
