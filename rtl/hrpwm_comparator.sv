// hrpwm_comparator: duty-command register and coarse comparators.
//
// The duty command dc has DC_W bits: the upper DC_W-FINE_W bits count whole
// counter cycles, the lower FINE_W bits count fractions of a cycle (phase
// steps or delay taps). dc is captured into dc_q on the clock edge that ends
// the counter's last state, so each PWM period uses one command throughout.
//
//   setd = (cnt == 0) and dc_q != 0   -> starts the PWM pulse
//   clrd = (cnt == dc_q[DC_W-1:FINE_W]) -> coarse end of the pulse
//   fine = dc_q[FINE_W-1:0]            -> fractional part for the reset delay
//
// Both strobes are combinational and one cycle wide; the modulator registers
// them before use so comparator glitches never reach the output latch.
// Holding dc for a period and suppressing setd for a zero command (so that
// set and reset never coincide) are this design's choices.
`timescale 1ns/1fs
module hrpwm_comparator #(
  parameter int unsigned DC_W   = 8,
  parameter int unsigned FINE_W = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [DC_W-1:0]        dc,
  input  logic [DC_W-FINE_W-1:0] cnt,
  input  logic                   last,
  output logic                   setd,
  output logic                   clrd,
  output logic [FINE_W-1:0]      fine
);

  logic [DC_W-1:0] dc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    dc_q <= '0;
    else if (last) dc_q <= dc;
  end

  always_comb begin
    setd = (cnt == '0) && (dc_q != '0);
    clrd = (cnt == dc_q[DC_W-1:FINE_W]);
    fine = dc_q[FINE_W-1:0];
  end

endmodule
