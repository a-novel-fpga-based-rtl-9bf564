// hrpwm_sr_ff: edge-triggered set/reset flip-flop that drives the PWM pin.
//
// The output rises on a rising edge of set_i and falls on a rising edge of
// reset_i; whichever input rose last decides the state, whatever the levels.
// This matters when a RESET pulse of a long duty command is still high at the
// start of the next period: a level-sensitive latch with reset priority would
// then hold the output low and shorten the pulse.
//
// Built from two flip-flops: s_q is clocked by set_i and loads ~r_q, r_q is
// clocked by reset_i and loads s_q; q = s_q ^ r_q. A set edge makes the two
// differ (q = 1), a reset edge makes them equal (q = 0), and repeated edges of
// the same input change nothing. rst_n clears both asynchronously.
// Set and reset edges must not coincide; the comparator guarantees this by
// suppressing the set for a zero duty command.
//
// A set/reset storage element driving the PWM is the modulator's; making it
// edge-triggered rather than level-sensitive is this design's choice.
`timescale 1ns/1fs
module hrpwm_sr_ff (
  input  logic rst_n,
  input  logic set_i,
  input  logic reset_i,
  output logic q
);

  logic s_q, r_q;

  always_ff @(posedge set_i or negedge rst_n) begin
    if (!rst_n) s_q <= 1'b0;
    else        s_q <= ~r_q;
  end

  always_ff @(posedge reset_i or negedge rst_n) begin
    if (!rst_n) r_q <= 1'b0;
    else        r_q <= s_q;
  end

  assign q = s_q ^ r_q;

endmodule
