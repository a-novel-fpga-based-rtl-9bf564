// hrpwm_counter: coarse period counter of the high-resolution PWM.
//
// A free-running W-bit up-counter. Its period of 2^W clock cycles is the PWM
// period; the modulator sets its output at the start of the count and clears
// it after a number of whole cycles plus a fraction of one. `last` is high in
// the final state (all ones), one cycle ahead of the wrap, and is used to
// load the next duty command so that it takes effect exactly at the period
// boundary.
//
// Timing: cnt changes on the rising edge of clk; rst_n is asynchronous and
// clears the count to 0. Counting up from 0 is this design's choice; the
// width (m-4 bits for an (m+1)-bit duty command with a 5-bit fine part)
// follows the modulator it serves.
`timescale 1ns/1fs
module hrpwm_counter #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] cnt,
  output logic         last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign last = &cnt;

endmodule
