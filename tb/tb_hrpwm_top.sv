// tb_hrpwm_top: end-to-end test of both modulators at their default sizes.
//
// Board clocks: 400 MHz for the clock-manager modulator (step 625 ps, period
// 160 ns), 200 MHz for the delay-line modulator (step 78.125 ps, period 20 ns).
// Each modulator is swept through every 8-bit duty command; after each
// command has settled, one pulse and one period are measured and compared
// with dc * step and 256 * step. The test then changes the command in the
// middle of a pulse and checks that the running pulse keeps the old width
// and the next one takes the new width.
//
// Mechanisms counted (each must occur at least once): clock lock, zero duty
// (no pulse), coarse-only pulses (fractional part 0), every fractional code
// (4 phase selections, 32 delay taps), a reset pulse that spills into the
// next period, a full-scale command and a command change taking effect at
// the period boundary.
`timescale 1ns/1fs
module tb_hrpwm_top;

  localparam realtime TDCM  = 2.5;
  localparam realtime TMMCM = 5.0;
  localparam realtime SDCM  = TDCM / 4.0;
  localparam realtime SIOD  = 2.5 / 32.0;
  localparam realtime PDCM  = 256.0 * SDCM;
  localparam realtime PIOD  = 256.0 * SIOD;
  localparam realtime TOL   = 0.001;

  logic       clk_dcm = 1'b0, clk_mmcm = 1'b0, rst_n = 1'b1;
  logic [7:0] dc_dcm = '0, dc_iod = '0;
  logic       pwm_dcm, pwm_iod, locked_dcm, ready_iod;

  always #(TDCM/2.0)  clk_dcm  = ~clk_dcm;
  always #(TMMCM/2.0) clk_mmcm = ~clk_mmcm;

  hrpwm_top dut (
    .clk_dcm (clk_dcm), .clk_mmcm (clk_mmcm), .rst_n (rst_n),
    .dc_dcm (dc_dcm), .dc_iod (dc_iod),
    .pwm_dcm (pwm_dcm), .pwm_iod (pwm_iod),
    .locked_dcm (locked_dcm), .ready_iod (ready_iod)
  );

  int checks = 0, failures = 0;

  // mechanism counters
  int n_lock = 0, n_zero = 0, n_coarse = 0, n_spill = 0, n_full = 0, n_update = 0;
  bit [3:0]  seen_phase = '0;
  bit [31:0] seen_tap   = '0;

  realtime tr_d = 0, per_d = 0, w_d = 0, tr_i = 0, per_i = 0, w_i = 0;
  int      rises_d = 0, rises_i = 0;
  always @(posedge pwm_dcm) begin if (rises_d > 0) per_d = $realtime - tr_d; tr_d = $realtime; rises_d++; end
  always @(negedge pwm_dcm) w_d = $realtime - tr_d;
  always @(posedge pwm_iod) begin if (rises_i > 0) per_i = $realtime - tr_i; tr_i = $realtime; rises_i++; end
  always @(negedge pwm_iod) w_i = $realtime - tr_i;

  function automatic bit near(realtime a, realtime b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic sweep_dcm();
    int r;
    for (int v = 0; v < 256; v++) begin
      dc_dcm = 8'(v);
      #(2.0 * PDCM + 0.1);
      r = rises_d;
      #(PDCM);
      if (v == 0) begin
        check(rises_d == r && !pwm_dcm, "dcm dc=0 gives no pulse");
        n_zero++;
      end else begin
        check(rises_d - r == 1, $sformatf("dcm dc=%0d one pulse per period", v));
        check(near(w_d, real'(v) * SDCM), $sformatf("dcm dc=%0d width %0.4f", v, w_d));
        check(near(per_d, PDCM), $sformatf("dcm dc=%0d period %0.4f", v, per_d));
        if (v % 4 == 0) n_coarse++;
        seen_phase[v % 4] = 1'b1;
        if (v / 4 == 63 && v % 4 != 0) n_spill++;
        if (v == 255) n_full++;
      end
    end
  endtask

  task automatic sweep_iod();
    int r;
    for (int v = 0; v < 256; v++) begin
      dc_iod = 8'(v);
      #(2.0 * PIOD + 0.1);
      r = rises_i;
      #(PIOD);
      if (v == 0) begin
        check(rises_i == r && !pwm_iod, "iod dc=0 gives no pulse");
        n_zero++;
      end else begin
        check(rises_i - r == 1, $sformatf("iod dc=%0d one pulse per period", v));
        check(near(w_i, real'(v) * SIOD), $sformatf("iod dc=%0d width %0.5f", v, w_i));
        check(near(per_i, PIOD), $sformatf("iod dc=%0d period %0.5f", v, per_i));
        if (v % 32 == 0) n_coarse++;
        seen_tap[v % 32] = 1'b1;
        if (v / 32 == 7 && v % 32 != 0) n_spill++;
        if (v == 255) n_full++;
      end
    end
  endtask

  // Change the command 1 ns into a pulse: this pulse keeps the old width.
  task automatic update_dcm(input logic [7:0] a, input logic [7:0] b);
    dc_dcm = a;
    #(2.0 * PDCM);
    @(posedge pwm_dcm);
    #1.0 dc_dcm = b;
    @(negedge pwm_dcm); #0.01;
    check(near(w_d, real'(a) * SDCM), $sformatf("dcm running pulse kept dc=%0d", a));
    @(negedge pwm_dcm); #0.01;
    check(near(w_d, real'(b) * SDCM), $sformatf("dcm next pulse took dc=%0d", b));
    n_update++;
  endtask

  task automatic update_iod(input logic [7:0] a, input logic [7:0] b);
    dc_iod = a;
    #(2.0 * PIOD);
    @(posedge pwm_iod);
    #1.0 dc_iod = b;
    @(negedge pwm_iod); #0.01;
    check(near(w_i, real'(a) * SIOD), $sformatf("iod running pulse kept dc=%0d", a));
    @(negedge pwm_iod); #0.01;
    check(near(w_i, real'(b) * SIOD), $sformatf("iod next pulse took dc=%0d", b));
    n_update++;
  endtask

  initial begin
    #(200000.0 * TDCM);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    // power-up: let the clocks lock, then apply one reset pulse
    wait (locked_dcm && ready_iod);
    #(2.0 * TMMCM + 0.2) rst_n = 1'b0;
    #(4.0 * TMMCM) rst_n = 1'b1;
    fork
      begin wait (locked_dcm); n_lock++; end
      begin wait (ready_iod);  n_lock++; end
    join
    check(n_lock == 2, "both modulators ready");
    fork
      begin sweep_dcm(); update_dcm(8'd200, 8'd37); end
      begin sweep_iod(); update_iod(8'd147, 8'd250); end
    join
    check(n_lock > 0,        "mechanism: lock");
    check(n_zero == 2,       "mechanism: zero duty");
    check(n_coarse > 0,      "mechanism: coarse-only pulse");
    check(&seen_phase,       "mechanism: every phase selection");
    check(&seen_tap,         "mechanism: every delay tap");
    check(n_spill > 0,       "mechanism: reset spilling into next period");
    check(n_full == 2,       "mechanism: full-scale command");
    check(n_update == 2,     "mechanism: command change at period boundary");
    $display("mechanisms: lock=%0d zero=%0d coarse=%0d phases=%b taps=%h spill=%0d full=%0d update=%0d",
             n_lock, n_zero, n_coarse, seen_phase, seen_tap, n_spill, n_full, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
