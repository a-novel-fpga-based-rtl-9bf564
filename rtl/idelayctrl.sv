// idelayctrl: behavioural model of the Virtex-6 delay-line calibration block
// (the real part is a vendor primitive that servoes the IODELAYE1 taps to
// REFCLK).
//
// Calibration itself is not modelled: the tap value is a parameter of the
// iodelaye1 model. This model only reports readiness: RDY rises after
// CAL_CYCLES rising edges of REFCLK with RST low and falls at once on RST.
// Both the cycle count and the reset behaviour are this model's choices.
`timescale 1ns/1fs
module idelayctrl #(
  parameter int unsigned CAL_CYCLES = 16
) (
  input  logic REFCLK,
  input  logic RST,
  output logic RDY
);

  localparam int unsigned CW = $clog2(CAL_CYCLES + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge REFCLK or posedge RST) begin
    if (RST)                          cnt <= '0;
    else if (cnt != CW'(CAL_CYCLES))  cnt <= cnt + 1'b1;
  end

  assign RDY = (cnt == CW'(CAL_CYCLES));

endmodule
