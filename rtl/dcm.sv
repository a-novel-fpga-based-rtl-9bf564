// dcm: behavioural model of the Spartan-3 Digital Clock Manager (not
// synthesizable; the real part is a vendor clock primitive).
//
// The model measures the CLKIN period between rising edges and raises LOCKED
// after LOCK_CYCLES edges. From then on every CLKIN rising edge launches one
// period of the delay-locked-loop outputs: CLK0 (in phase with CLKIN plus the
// phase shift), CLK90, CLK180 and CLK270 (quadrant phases), CLK2X and
// CLK2X180 (doubled), CLKDV (CLKIN divided by CLKDV_DIVIDE). Every
// CLKFX_DIVIDE input edges the frequency synthesizer emits CLKFX_MULTIPLY
// cycles of CLKFX, i.e. f_FX = f_IN * CLKFX_MULTIPLY / CLKFX_DIVIDE, with
// CLKFX180 its inverse. All outputs have a 50 % duty cycle and are 0 until
// lock.
//
// Phase shift: PHASE_SHIFT in [-255, 255] shifts all outputs by
// PHASE_SHIFT/256 of a period (a negative value leads CLKIN). A PSEN pulse
// sampled on PSCLK moves the shift by one step up (PSINCDEC = 1) or down;
// PSDONE pulses for one PSCLK cycle two cycles later. STATUS[0] is set when a
// step would leave the range.
//
// Status: while locked, STATUS[1] is high whenever CLKIN has had no rising
// edge for more than two measured input periods, and STATUS[2] likewise for
// CLKFX (two CLKFX periods). Both are checked every half input period and
// fall again once the clock toggles. STATUS[7:3] read 0. The model keeps
// LOCKED high through a stop; apply RST after the input clock returns, as
// the first period it measures then includes the gap.
//
// Outputs change by non-blocking assignment, so flip-flops clocked by two
// outputs that rise at the same instant (CLKFX and CLK0) both sample the
// values from before that instant.
//
// CLKFB is accepted for port compatibility; the model has no insertion delay
// to remove, so it does not use it. RST clears LOCKED and returns the shift to
// PHASE_SHIFT. Lock time, PSDONE latency and the absence of a deskew loop are
// this model's simplifications.
`timescale 1ns/1fs
module dcm #(
  parameter int CLKFX_MULTIPLY = 2,
  parameter int CLKFX_DIVIDE   = 2,
  parameter int CLKDV_DIVIDE   = 2,
  parameter int PHASE_SHIFT    = 0,
  parameter int LOCK_CYCLES    = 4
) (
  input  logic       CLKIN,
  input  logic       CLKFB,
  input  logic       RST,
  input  logic       PSEN,
  input  logic       PSINCDEC,
  input  logic       PSCLK,
  output logic       CLK0,
  output logic       CLK90,
  output logic       CLK180,
  output logic       CLK270,
  output logic       CLK2X,
  output logic       CLK2X180,
  output logic       CLKDV,
  output logic       CLKFX,
  output logic       CLKFX180,
  output logic       LOCKED,
  output logic       PSDONE,
  output logic [7:0] STATUS
);

  realtime period = 0.0;
  realtime t_last = 0.0;
  int      edges  = 0;
  int      ps     = PHASE_SHIFT;
  logic    ps_ovf = 1'b0;

  initial assert (PHASE_SHIFT >= -255 && PHASE_SHIFT <= 255)
    else $error("dcm: PHASE_SHIFT out of [-255, 255]");

  // Shift as a delay in [0, period).
  function automatic realtime shift_delay(input int s, input realtime p);
    int m;
    m = ((s % 256) + 256) % 256;
    return p * real'(m) / 256.0;
  endfunction

  // One period's worth of each output, launched from a CLKIN edge.
  task automatic pulse_clk0(input realtime d0, input realtime p);
    #(d0) begin CLK0 <= 1'b1; CLK180 <= 1'b0; end
    #(p / 2.0) begin CLK0 <= 1'b0; CLK180 <= 1'b1; end
  endtask

  task automatic pulse_clk90(input realtime d0, input realtime p);
    #(d0) begin CLK90 <= 1'b1; CLK270 <= 1'b0; end
    #(p / 2.0) begin CLK90 <= 1'b0; CLK270 <= 1'b1; end
  endtask

  task automatic pulse_clk2x(input realtime d0, input realtime p);
    repeat (2) begin
      #(d0) begin CLK2X <= 1'b1; CLK2X180 <= 1'b0; end
      #(p / 4.0) begin CLK2X <= 1'b0; CLK2X180 <= 1'b1; end
      d0 = p / 4.0;
    end
  endtask

  task automatic pulse_clkdv(input realtime d0, input realtime p);
    #(d0) CLKDV <= 1'b1;
    #(p * real'(CLKDV_DIVIDE) / 2.0) CLKDV <= 1'b0;
  endtask

  task automatic burst_clkfx(input realtime d0, input realtime p);
    realtime pfx;
    pfx = p * real'(CLKFX_DIVIDE) / real'(CLKFX_MULTIPLY);
    #(d0);
    repeat (CLKFX_MULTIPLY) begin
      CLKFX <= 1'b1; CLKFX180 <= 1'b0; #(pfx / 2.0);
      CLKFX <= 1'b0; CLKFX180 <= 1'b1; #(pfx / 2.0);
    end
  endtask

  always @(posedge CLKIN or posedge RST) begin
    if (RST) begin
      edges  = 0;
      LOCKED = 1'b0;
      {CLK0, CLK90, CLK180, CLK270, CLK2X, CLK2X180, CLKDV, CLKFX, CLKFX180} <= '0;
    end else begin
      if (edges > 0) period = $realtime - t_last;
      t_last = $realtime;
      if (edges >= LOCK_CYCLES) LOCKED = 1'b1;
      if (LOCKED) begin
        fork
          pulse_clk0(shift_delay(ps, period), period);
          pulse_clk90(shift_delay(ps, period) + period / 4.0, period);
          pulse_clk2x(shift_delay(ps, period), period);
        join_none
        if (edges % CLKDV_DIVIDE == 0)
          fork
            pulse_clkdv(shift_delay(ps, period), period);
          join_none
        if (edges % CLKFX_DIVIDE == 0)
          fork
            burst_clkfx(shift_delay(ps, period), period);
          join_none
      end
      edges = edges + 1;
    end
  end

  // Variable phase shift interface.
  int   ps_wait    = 0;
  logic ps_pending = 1'b0;
  logic psdone_r   = 1'b0;

  always @(posedge PSCLK or posedge RST) begin
    if (RST) begin
      ps         = PHASE_SHIFT;
      ps_pending = 1'b0;
      psdone_r   = 1'b0;
      ps_ovf     = 1'b0;
    end else begin
      psdone_r = 1'b0;
      if (ps_pending) begin
        if (ps_wait == 0) begin
          psdone_r   = 1'b1;
          ps_pending = 1'b0;
        end else begin
          ps_wait = ps_wait - 1;
        end
      end else if (PSEN) begin
        if (PSINCDEC && ps < 255)       ps = ps + 1;
        else if (!PSINCDEC && ps > -255) ps = ps - 1;
        else                             ps_ovf = 1'b1;
        ps_pending = 1'b1;
        ps_wait    = 1;
      end
    end
  end

  initial begin
    {CLK0, CLK90, CLK180, CLK270, CLK2X, CLK2X180, CLKDV, CLKFX, CLKFX180} = '0;
    LOCKED = 1'b0;
  end

  // Stopped-clock monitors, self-timed so that they run while CLKIN is idle.
  realtime t_fx       = 0.0;
  logic    clkin_stop = 1'b0;
  logic    clkfx_stop = 1'b0;

  always @(posedge CLKFX) t_fx = $realtime;

  always begin
    @(posedge LOCKED);
    t_fx = $realtime;
    while (LOCKED) begin
      #(period / 2.0);
      clkin_stop = ($realtime - t_last) > 2.0 * period;
      clkfx_stop = ($realtime - t_fx)
                   > 2.0 * period * real'(CLKFX_DIVIDE) / real'(CLKFX_MULTIPLY);
    end
    clkin_stop = 1'b0;
    clkfx_stop = 1'b0;
  end

  always_comb STATUS = {5'd0, clkfx_stop, clkin_stop, ps_ovf};
  always_comb PSDONE = psdone_r;

endmodule
