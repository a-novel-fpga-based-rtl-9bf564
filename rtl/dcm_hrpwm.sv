// dcm_hrpwm: DCM-based synchronous high-resolution PWM.
//
// The PWM period is 2^(DC_W - log2 P) cycles of a clock of period T, and the
// pulse width is dc * T/P, where P = 4*R phase clocks come from R clock
// managers. The duty command splits in two: its upper bits count whole
// cycles on a coarse counter, its log2(P) lower bits pick one of P phase
// clocks that retime the end-of-pulse strobe, delaying it by a fraction
// (s+1)/P of a cycle.
//
//   clock managers  R dcm instances on clk_in. Manager j runs with a fixed
//                   phase shift of j*256/P (j/P of a period), so the
//                   quadrant outputs CLK0/90/180/270 of all managers form P
//                   evenly spaced clocks: phase k = q*R + j lags by k/P.
//                   The counter runs on CLKFX of manager 0, set to the CLKIN
//                   frequency (CLKFX_MULTIPLY = CLKFX_DIVIDE = 2).
//   counter         hrpwm_counter, W = DC_W - log2 P.
//   comparator      hrpwm_comparator: SETD at count 0, CLRD at count dc_msb.
//   set flip-flop   SETD retimed on phase clock 1 (lag T/P).
//   multiphase      multiphase_circuit: CLRD retimed on phase (s+1) mod P.
//   output          hrpwm_sr_ff: set by the retimed SETD, cleared by the
//                   multiphase output.
//
// Timing: PWM rises T/P after the counter reaches 0 and falls dc*T/P later;
// set and reset paths both go through one retiming flip-flop, so a duty
// command of 0 gives no pulse and 2^DC_W - 1 the widest. The core is held in
// reset until every clock manager is locked. A new dc is taken at the period
// boundary.
//
// The block structure (DCM, counter, comparator, D flip-flop, multiphase
// circuit, SR flip-flop) and p = 4r follow the modulator's description; the
// phase shifts of the extra managers, the counter clock ratio, the clock of
// the set flip-flop and the edge-triggered output stage are this design's
// choices. R must be a power of two.
`timescale 1ns/1fs
module dcm_hrpwm #(
  parameter int unsigned DC_W = 8,
  parameter int unsigned R    = 1
) (
  input  logic            clk_in,
  input  logic            rst_n,
  input  logic [DC_W-1:0] dc,
  output logic            pwm,
  output logic            locked
);

  localparam int unsigned P     = 4 * R;
  localparam int unsigned LSB_W = $clog2(P);
  localparam int unsigned CNT_W = DC_W - LSB_W;

  logic [P-1:0] ph_clk;
  logic [R-1:0] dcm_locked;
  logic [R-1:0] clkfx;

  for (genvar j = 0; j < R; j++) begin : g_dcm
    logic clk0, clk90, clk180, clk270;
    dcm #(
      .CLKFX_MULTIPLY (2),
      .CLKFX_DIVIDE   (2),
      .PHASE_SHIFT    (int'(j * 256 / P))
    ) u_dcm (
      .CLKIN    (clk_in),
      .CLKFB    (clk0),
      .RST      (~rst_n),
      .PSEN     (1'b0),
      .PSINCDEC (1'b0),
      .PSCLK    (1'b0),
      .CLK0     (clk0),
      .CLK90    (clk90),
      .CLK180   (clk180),
      .CLK270   (clk270),
      .CLK2X    (),
      .CLK2X180 (),
      .CLKDV    (),
      .CLKFX    (clkfx[j]),
      .CLKFX180 (),
      .LOCKED   (dcm_locked[j]),
      .PSDONE   (),
      .STATUS   ()
    );
    assign ph_clk[0*R + j] = clk0;
    assign ph_clk[1*R + j] = clk90;
    assign ph_clk[2*R + j] = clk180;
    assign ph_clk[3*R + j] = clk270;
  end

  assign locked = &dcm_locked;

  logic core_rst_n;
  assign core_rst_n = rst_n & locked;

  logic [CNT_W-1:0] cnt;
  logic             last;
  logic             setd, clrd;
  logic [LSB_W-1:0] fine;
  logic             set_q, reset_mp;

  hrpwm_counter #(.W(CNT_W)) u_cnt (
    .clk (clkfx[0]), .rst_n (core_rst_n), .cnt (cnt), .last (last)
  );

  hrpwm_comparator #(.DC_W(DC_W), .FINE_W(LSB_W)) u_cmp (
    .clk (clkfx[0]), .rst_n (core_rst_n), .dc (dc), .cnt (cnt), .last (last),
    .setd (setd), .clrd (clrd), .fine (fine)
  );

  // Set path: one retiming flip-flop on phase 1, matching the reset path of
  // a zero fractional part.
  always_ff @(posedge ph_clk[1] or negedge core_rst_n) begin
    if (!core_rst_n) set_q <= 1'b0;
    else             set_q <= setd;
  end

  multiphase_circuit #(.P(P)) u_mp (
    .ph_clk (ph_clk), .rst_n (core_rst_n), .din (clrd), .sel (fine),
    .reset_o (reset_mp)
  );

  hrpwm_sr_ff u_sr (
    .rst_n (core_rst_n), .set_i (set_q), .reset_i (reset_mp), .q (pwm)
  );

  initial assert ((P & (P - 1)) == 0 && DC_W > LSB_W)
    else $error("dcm_hrpwm: R must be a power of two and DC_W > log2(4R)");

endmodule
