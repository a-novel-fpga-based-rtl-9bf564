// tb_iodelay_hrpwm: self-checking test of the IODELAYE1-based modulator.
//
// A 200 MHz board clock gives CK2 = 400 MHz and CK_REF = 200 MHz; one tap is
// 2.5 ns / 32 = 78.125 ps and the PWM period 256 taps = 20 ns. For each duty
// command the high time is integrated over four periods after the command
// has settled and compared with dc * tap; pulse count, period and last pulse
// width are checked too. For the worked example dc = 8'b100_10011 the test
// also checks that CLR rises while the counter reads 5 and that RESET
// follows CLR by exactly 19 taps. The MMCM output frequencies are checked
// against f_in * M / (D * O). A second, three-channel instance runs three
// different random duty commands at once and checks each channel's width.
`timescale 1ns/1fs
module tb_iodelay_hrpwm;

  localparam realtime TCK  = 5.0;
  localparam realtime TAP  = 2.5 / 32.0;
  localparam realtime TP   = 256.0 * TAP;
  localparam realtime TOL  = 0.001;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic [7:0] dc = '0;
  logic       pwm, ready;

  always #(TCK/2.0) clk = ~clk;

  iodelay_hrpwm dut (.clk_in(clk), .rst_n(rst_n), .dc(dc), .pwm(pwm), .ready(ready));

  logic [2:0][7:0] dc3 = '0;
  logic [2:0]      pwm3;
  logic            ready3;
  iodelay_hrpwm #(.NCH(3)) dut3 (.clk_in(clk), .rst_n(rst_n), .dc(dc3), .pwm(pwm3), .ready(ready3));

  realtime acc3 [3], tr3 [3];
  for (genvar c = 0; c < 3; c++) begin : g_m3
    initial begin acc3[c] = 0; tr3[c] = 0; end
    always @(posedge pwm3[c]) tr3[c] = $realtime;
    always @(negedge pwm3[c]) acc3[c] += $realtime - tr3[c];
  end
  function automatic realtime cum3(int c); return acc3[c] + (pwm3[c] ? $realtime - tr3[c] : 0.0); endfunction

  int checks = 0, failures = 0;

  realtime acc = 0, tr = 0, per = 0, w = 0;
  int      rises = 0;
  always @(posedge pwm) begin if (rises > 0) per = $realtime - tr; tr = $realtime; rises++; end
  always @(negedge pwm) begin w = $realtime - tr; acc += w; end
  function automatic realtime cum(); return acc + (pwm ? $realtime - tr : 0.0); endfunction

  // CLR -> RESET spacing
  realtime t_clr = 0, gap = 0;
  int      cnt_at_clr = -1;
  always @(posedge dut.g_ch[0].clr_q) begin t_clr = $realtime; cnt_at_clr = int'(dut.cnt); end
  always @(posedge dut.g_ch[0].reset_d) gap = $realtime - t_clr;

  // clock frequencies
  realtime tck2 = 0, pck2 = 0, tref = 0, pref = 0;
  always @(posedge dut.ck2)    begin pck2 = $realtime - tck2; tck2 = $realtime; end
  always @(posedge dut.ck_ref) begin pref = $realtime - tref; tref = $realtime; end

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
    realtime a, h;
    int      r;
    realtime a3 [3];
    dc = v;
    for (int c = 0; c < 3; c++) dc3[c] = 8'($urandom_range(0, 255));
    #(2.0 * TP + 0.7);
    a = cum(); r = rises;
    for (int c = 0; c < 3; c++) a3[c] = cum3(c);
    #(4.0 * TP);
    h = (cum() - a) / 4.0;
    for (int c = 0; c < 3; c++)
      check(near((cum3(c) - a3[c]) / 4.0, real'(dc3[c]) * TAP),
            $sformatf("channel %0d dc=%0d high %0.5f", c, dc3[c], (cum3(c) - a3[c]) / 4.0));
    check(near(h, real'(v) * TAP), $sformatf("dc=%0d high %0.5f ns, want %0.5f", v, h, real'(v) * TAP));
    check(rises - r == ((v != 0) ? 4 : 0), $sformatf("dc=%0d pulses %0d", v, rises - r));
    if (v != 0) begin
      check(near(per, TP), $sformatf("dc=%0d period %0.5f", v, per));
      check(near(w, real'(v) * TAP), $sformatf("dc=%0d width %0.5f", v, w));
      check(near(gap, real'(v[4:0]) * TAP), $sformatf("dc=%0d CLR->RESET %0.5f", v, gap));
    end
  endtask

  initial begin
    #(20000.0 * TCK);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    logic [7:0] vals [] = '{8'd1, 8'd2, 8'd19, 8'd31, 8'd32, 8'd33, 8'd0, 8'd64,
                            8'd127, 8'd128, 8'd200, 8'd223, 8'd224, 8'd225,
                            8'd240, 8'd254, 8'd255, 8'd0, 8'd5};
    // power-up: let the MMCM lock, then apply one reset pulse
    wait (ready && ready3);
    #(2.0 * TCK + 0.3) rst_n = 1'b0;
    #(4.0 * TCK) rst_n = 1'b1;
    wait (ready && ready3);
    check(1'b1, "ready");
    #(4.0 * TCK);
    check(near(pck2, 2.5), $sformatf("CK2 period %0.4f", pck2));
    check(near(pref, 5.0), $sformatf("CK_REF period %0.4f", pref));
    // worked example: dc = "10010011"
    run_case(8'b1001_0011);
    check(cnt_at_clr == 5, $sformatf("CLR rose at CNT=%0d, want 5", cnt_at_clr));
    check(dut.g_ch[0].tap_now == 5'd19, $sformatf("tap %0d, want 19", dut.g_ch[0].tap_now));
    check(near(gap, 19.0 * TAP), "RESET 19 taps after CLR");
    foreach (vals[i]) run_case(vals[i]);
    repeat (16) run_case(8'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
