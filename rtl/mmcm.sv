// mmcm: behavioural model of the Virtex-6 Mixed Mode Clock Manager (not
// synthesizable; the real part is a vendor PLL primitive).
//
// The model measures the CLKIN1 period and raises LOCKED after LOCK_CYCLES
// rising edges. At lock, all outputs start together on a CLKIN1 rising edge
// and then run freely:
//   CLKOUT[i]: f = f_in * M / (D * O[i]),  i = 0..6
//   CLKFBOUT:  f = f_in / D  (the VCO divided by M)
// with 50 % duty cycle. The phase detector, charge pump, loop filter and VCO
// are not modelled: the periods are exact multiples of the measured input
// period. RST stops all outputs, clears LOCKED and forces a new lock.
// While locked, CLKINSTOPPED is high whenever CLKIN1 has had no rising edge
// for more than two input periods, and CLKFBSTOPPED whenever CLKFBIN has had
// none for more than two feedback periods (D input periods); both are checked
// every half input period and fall once the clock toggles again. The outputs
// keep running through a stop and LOCKED stays high; apply RST once the input
// returns. CLKFBIN is watched only for CLKFBSTOPPED: the model has no loop to
// close through it. Attribute ranges
// (M 1..64, D 1..80, O 1..128) are checked at elaboration time.
//
// Defaults M = 8, D = 2, O[0] = 2, O[1] = 4 are the modulator's settings:
// with a 200 MHz input they give 400 MHz and 200 MHz.
`timescale 1ns/1fs
module mmcm #(
  parameter int          M           = 8,
  parameter int          D           = 2,
  parameter int unsigned O [7]       = '{2, 4, 1, 1, 1, 1, 1},
  parameter int          LOCK_CYCLES = 4
) (
  input  logic       CLKIN1,
  input  logic       CLKFBIN,
  input  logic       RST,
  output logic [6:0] CLKOUT,
  output logic       CLKFBOUT,
  output logic       LOCKED,
  output logic       CLKINSTOPPED,
  output logic       CLKFBSTOPPED
);

  realtime    period = 0.0;
  realtime    t_last = 0.0;
  int         edges  = 0;
  int         gen    = 0;        // bumped on reset; stale generators exit

  initial LOCKED = 1'b0;

  // Attribute ranges of the real part: M 1..64, D 1..80, O 1..128.
  initial begin
    assert (M >= 1 && M <= 64 && D >= 1 && D <= 80)
      else $error("mmcm: M or D out of range");
    for (int i = 0; i < 7; i++)
      assert (O[i] >= 1 && O[i] <= 128) else $error("mmcm: O%0d out of range", i);
  end

  always @(posedge CLKIN1 or posedge RST) begin
    if (RST) begin
      edges    = 0;
      LOCKED   = 1'b0;
      gen      = gen + 1;
    end else begin
      if (edges > 0) period = $realtime - t_last;
      t_last = $realtime;
      edges  = edges + 1;
      if (!LOCKED && edges > LOCK_CYCLES) LOCKED = 1'b1;
    end
  end

  // One free-running generator per output, started by LOCKED; a generator
  // stops writing as soon as a reset starts a new lock, and its output is
  // masked by LOCKED meanwhile.
  for (genvar i = 0; i < 7; i++) begin : g_out
    logic q = 1'b0;
    always begin
      int      g;
      realtime pk;
      @(posedge LOCKED);
      g  = gen;
      pk = period * real'(D) * real'(O[i]) / real'(M);
      while (gen == g) begin
        q <= 1'b1; #(pk / 2.0);
        q <= 1'b0; #(pk / 2.0);
      end
    end
    assign CLKOUT[i] = q & LOCKED;
  end

  logic fb_q = 1'b0;
  always begin
    int      g;
    realtime pf;
    @(posedge LOCKED);
    g  = gen;
    pf = period * real'(D);
    while (gen == g) begin
      fb_q <= 1'b1; #(pf / 2.0);
      fb_q <= 1'b0; #(pf / 2.0);
    end
  end
  assign CLKFBOUT = fb_q & LOCKED;

  // Stopped-clock monitors, self-timed so that they run while CLKIN1 is idle.
  realtime t_fb = 0.0;
  initial begin
    CLKINSTOPPED = 1'b0;
    CLKFBSTOPPED = 1'b0;
  end

  always @(posedge CLKFBIN) t_fb = $realtime;

  always begin
    @(posedge LOCKED);
    t_fb = $realtime;
    while (LOCKED) begin
      #(period / 2.0);
      CLKINSTOPPED = ($realtime - t_last) > 2.0 * period;
      CLKFBSTOPPED = ($realtime - t_fb) > 2.0 * period * real'(D);
    end
    CLKINSTOPPED = 1'b0;
    CLKFBSTOPPED = 1'b0;
  end

endmodule
