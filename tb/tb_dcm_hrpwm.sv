// tb_dcm_hrpwm: self-checking test of the DCM-based modulator.
//
// Two instances run from one 400 MHz clock: R = 1 (four quadrant phases, step
// 625 ps, period 64 cycles = 160 ns) and R = 2 (eight phases, step 312.5 ps,
// period 32 cycles = 80 ns). For each duty command the PWM high time is
// integrated over two whole periods after the command has settled and
// compared with dc * step; the number of pulses, the pulse period and the
// last pulse width are checked too. Expected values come from the formula
// width = dc * T / (4R), period = 2^8 * T / (4R), not from the design.
//
// A third instance, R = 32 with a 10-bit command, has 128 phases: step
// 2.5 ns / 128 = 19.53 ps and period 1024 steps = 20 ns (a 3-bit counter).
// It is run afterwards over a set of codes that touch every fine bit.
`timescale 1ns/1fs
module tb_dcm_hrpwm;

  localparam realtime TCLK  = 2.5;
  localparam realtime STEP1 = TCLK / 4.0;
  localparam realtime STEP2 = TCLK / 8.0;
  localparam realtime TP1   = 256.0 * STEP1;
  localparam realtime TP2   = 256.0 * STEP2;
  localparam realtime STEP3 = TCLK / 128.0;
  localparam realtime TP3   = 1024.0 * STEP3;
  localparam realtime TOL   = 0.001;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic [7:0] dc1 = '0, dc2 = '0;
  logic [9:0] dc3 = '0;
  logic       pwm1, pwm2, pwm3, lk1, lk2, lk3;

  always #(TCLK/2.0) clk = ~clk;

  dcm_hrpwm dut1 (.clk_in(clk), .rst_n(rst_n), .dc(dc1), .pwm(pwm1), .locked(lk1));
  dcm_hrpwm #(.R(2)) dut2 (.clk_in(clk), .rst_n(rst_n), .dc(dc2), .pwm(pwm2), .locked(lk2));

  dcm_hrpwm #(.DC_W(10), .R(32)) dut3 (.clk_in(clk), .rst_n(rst_n), .dc(dc3), .pwm(pwm3), .locked(lk3));

  int checks = 0, failures = 0;

  // PWM meters
  realtime acc1 = 0, tr1 = 0, per1 = 0, w1 = 0;
  realtime acc2 = 0, tr2 = 0, per2 = 0, w2 = 0;
  realtime acc3 = 0, tr3 = 0, per3 = 0, w3 = 0;
  int      rises1 = 0, rises2 = 0, rises3 = 0;
  always @(posedge pwm1) begin if (rises1 > 0) per1 = $realtime - tr1; tr1 = $realtime; rises1++; end
  always @(negedge pwm1) begin w1 = $realtime - tr1; acc1 += w1; end
  always @(posedge pwm2) begin if (rises2 > 0) per2 = $realtime - tr2; tr2 = $realtime; rises2++; end
  always @(negedge pwm2) begin w2 = $realtime - tr2; acc2 += w2; end
  always @(posedge pwm3) begin if (rises3 > 0) per3 = $realtime - tr3; tr3 = $realtime; rises3++; end
  always @(negedge pwm3) begin w3 = $realtime - tr3; acc3 += w3; end

  function automatic realtime cum1(); return acc1 + (pwm1 ? $realtime - tr1 : 0.0); endfunction
  function automatic realtime cum2(); return acc2 + (pwm2 ? $realtime - tr2 : 0.0); endfunction
  function automatic realtime cum3(); return acc3 + (pwm3 ? $realtime - tr3 : 0.0); endfunction

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

  task automatic run_case(input logic [7:0] v);
    realtime a1, a2, h1, h2;
    int      r1, r2;
    dc1 = v;
    dc2 = v;
    #(2.0 * TP1 + 1.3);            // settle: a new command waits for a period boundary
    a1 = cum1(); a2 = cum2(); r1 = rises1; r2 = rises2;
    #(2.0 * TP1);                  // 2 periods of dut1, 4 of dut2
    h1 = (cum1() - a1) / 2.0;
    h2 = (cum2() - a2) / 4.0;
    check(near(h1, real'(v) * STEP1), $sformatf("R=1 dc=%0d high %0.4f ns, want %0.4f", v, h1, real'(v) * STEP1));
    check(near(h2, real'(v) * STEP2), $sformatf("R=2 dc=%0d high %0.4f ns, want %0.4f", v, h2, real'(v) * STEP2));
    check(rises1 - r1 == ((v != 0) ? 2 : 0), $sformatf("R=1 dc=%0d pulses %0d", v, rises1 - r1));
    check(rises2 - r2 == ((v != 0) ? 4 : 0), $sformatf("R=2 dc=%0d pulses %0d", v, rises2 - r2));
    if (v != 0) begin
      check(near(per1, TP1), $sformatf("R=1 dc=%0d period %0.4f", v, per1));
      check(near(per2, TP2), $sformatf("R=2 dc=%0d period %0.4f", v, per2));
      check(near(w1, real'(v) * STEP1), $sformatf("R=1 dc=%0d width %0.4f", v, w1));
      check(near(w2, real'(v) * STEP2), $sformatf("R=2 dc=%0d width %0.4f", v, w2));
    end
  endtask

  task automatic run_fine(input logic [9:0] v);
    realtime a3, h3;
    int      r3;
    dc3 = v;
    #(2.0 * TP3 + 1.3);
    a3 = cum3(); r3 = rises3;
    #(4.0 * TP3);
    h3 = (cum3() - a3) / 4.0;
    check(near(h3, real'(v) * STEP3), $sformatf("R=32 dc=%0d high %0.5f ns, want %0.5f", v, h3, real'(v) * STEP3));
    check(rises3 - r3 == ((v != 0) ? 4 : 0), $sformatf("R=32 dc=%0d pulses %0d", v, rises3 - r3));
    if (v != 0) begin
      check(near(per3, TP3), $sformatf("R=32 dc=%0d period %0.4f", v, per3));
      check(near(w3, real'(v) * STEP3), $sformatf("R=32 dc=%0d width %0.5f", v, w3));
    end
  endtask

  initial begin
    #(60000.0 * TCLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    logic [7:0] vals [] = '{8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7, 8'd0,
                            8'd63, 8'd64, 8'd127, 8'd128, 8'd147, 8'd200,
                            8'd252, 8'd253, 8'd254, 8'd255, 8'd0, 8'd9};
    // power-up: let the clock managers lock, then apply one reset pulse
    wait (lk1 && lk2 && lk3);
    #(2.0 * TCLK + 0.3) rst_n = 1'b0;
    #(4.0 * TCLK) rst_n = 1'b1;
    wait (lk1 && lk2 && lk3);
    check(1'b1, "locked");
    foreach (vals[i]) run_case(vals[i]);
    repeat (12) run_case(8'($urandom_range(0, 255)));
    for (int b = 0; b < 10; b++) run_fine(10'(1 << b));
    foreach (vals[i]) run_fine({vals[i], 2'b01});
    run_fine(10'd0);
    run_fine(10'd1023);
    repeat (12) run_fine(10'($urandom_range(0, 1023)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
