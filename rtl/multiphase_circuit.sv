// multiphase_circuit: fractional-period delay of the reset strobe.
//
// P D flip-flops all sample the same input din (the coarse CLRD strobe), each
// on its own clock ph_clk[k], which lags phase 0 by k/P of a period. With a
// strobe that changes just after a phase-0 edge, flip-flop k (k = 1..P-1)
// repeats it k/P of a period later and flip-flop 0 one full period later.
// A P-to-1 multiplexer, steered by the duty command's LSBs, picks one of them:
// select s takes flip-flop (s+1) mod P, so the delay is (s+1)/P of a period,
// growing by one phase step per select code. With P = 4*r clocks from r clock
// managers the step is T/(4r).
//
// Interface: ph_clk[P-1:0] phase clocks in order of increasing lag, rst_n
// asynchronous reset, din the strobe, sel the LSBs (stable while a pulse is in
// flight), reset_o the delayed strobe.
//
// The structure (parallel flip-flops on quadrant clocks, multiplexer on the
// duty LSBs) follows the modulator; the mapping of select codes to
// flip-flops is this design's choice.
`timescale 1ns/1fs
module multiphase_circuit #(
  parameter int unsigned P = 4
) (
  input  logic [P-1:0]         ph_clk,
  input  logic                 rst_n,
  input  logic                 din,
  input  logic [$clog2(P)-1:0] sel,
  output logic                 reset_o
);

  logic [P-1:0] ff_q;

  for (genvar k = 0; k < P; k++) begin : g_ff
    logic q;
    always_ff @(posedge ph_clk[k] or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= din;
    end
    assign ff_q[k] = q;
  end

  logic [$clog2(P)-1:0] idx;

  always_comb begin
    idx     = sel + 1'b1;   // wraps from P-1 to 0 (P is a power of two)
    reset_o = ff_q[idx];
  end

endmodule
