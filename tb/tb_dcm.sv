// tb_dcm: checks the clock-manager model. With a 10 ns input and
// CLKFX = 5/2: lock after the set number of edges; CLK0/90/180/270 rise 0,
// 2.5, 5 and 7.5 ns after a CLKIN edge; CLK2X has 5 ns period; CLKDV 20 ns;
// CLKFX 4 ns. A second instance with PHASE_SHIFT = 64 moves CLK0 by a
// quarter period. Variable shift: 8 PSEN increments move CLK0 by
// 8/256 * 10 ns and each gives one PSDONE; stepping past +255 sets STATUS[0].
// Holding CLKIN low for 40 ns raises STATUS[1] and STATUS[2] on both
// instances, and they fall again once CLKIN toggles.
`timescale 1ns/1fs
module tb_dcm;
  localparam realtime T = 10.0, TOL = 0.001;
  logic run = 1'b1;
  logic clk = 1'b0, rst = 1'b1, psen = 1'b0, psinc = 1'b1, psclk = 1'b0;
  logic c0, c90, c180, c270, c2x, c2x180, cdv, cfx, cfx180, lk, psdone;
  logic [7:0] st;
  logic b0, b90, b180, b270, b2x, b2x180, bdv, bfx, bfx180, blk, bpsd;
  logic [7:0] bst;
  int checks = 0, failures = 0;

  always #(T/2.0) if (run) clk = ~clk;
  always #2.0 psclk = ~psclk;

  dcm #(.CLKFX_MULTIPLY(5), .CLKFX_DIVIDE(2), .CLKDV_DIVIDE(2)) dut (
    .CLKIN(clk), .CLKFB(c0), .RST(rst), .PSEN(psen), .PSINCDEC(psinc), .PSCLK(psclk),
    .CLK0(c0), .CLK90(c90), .CLK180(c180), .CLK270(c270), .CLK2X(c2x), .CLK2X180(c2x180),
    .CLKDV(cdv), .CLKFX(cfx), .CLKFX180(cfx180), .LOCKED(lk), .PSDONE(psdone), .STATUS(st));

  dcm #(.PHASE_SHIFT(64)) dut_b (
    .CLKIN(clk), .CLKFB(b0), .RST(rst), .PSEN(1'b0), .PSINCDEC(1'b0), .PSCLK(1'b0),
    .CLK0(b0), .CLK90(b90), .CLK180(b180), .CLK270(b270), .CLK2X(b2x), .CLK2X180(b2x180),
    .CLKDV(bdv), .CLKFX(bfx), .CLKFX180(bfx180), .LOCKED(blk), .PSDONE(bpsd), .STATUS(bst));

  realtime tin = 0, t0 = 0, t90 = 0, t180 = 0, t270 = 0, tb0 = 0, p2x = 0, pdv = 0, pfx = 0;
  realtime l2x = 0, ldv = 0, lfx = 0;
  int ndone = 0;
  always @(posedge clk)  tin  = $realtime;
  always @(posedge c0)   t0   = $realtime;
  always @(posedge c90)  t90  = $realtime;
  always @(posedge c180) t180 = $realtime;
  always @(posedge c270) t270 = $realtime;
  always @(posedge b0)   tb0  = $realtime;
  always @(posedge c2x)  begin p2x = $realtime - l2x; l2x = $realtime; end
  always @(posedge cdv)  begin pdv = $realtime - ldv; ldv = $realtime; end
  always @(posedge cfx)  begin pfx = $realtime - lfx; lfx = $realtime; end
  always @(posedge psclk) if (psdone) ndone++;

  function automatic bit near(realtime a, realtime b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    #(2.0 * T) rst = 1'b0;
    repeat (3) @(posedge clk);
    check(!lk, "not locked early");
    wait (lk);
    repeat (4) @(posedge clk);
    #(T - 0.5);   // just before the next CLKIN edge
    check(near(t0, tin), $sformatf("CLK0 at %0.3f", t0 - tin));
    check(near(t90, tin + 2.5), $sformatf("CLK90 at %0.3f", t90 - tin));
    check(near(t180, tin + 5.0), $sformatf("CLK180 at %0.3f", t180 - tin));
    check(near(t270, tin + 7.5), $sformatf("CLK270 at %0.3f", t270 - tin));
    check(near(tb0, tin + 2.5), $sformatf("PHASE_SHIFT=64 CLK0 at %0.3f", tb0 - tin));
    check(near(p2x, 5.0), $sformatf("CLK2X period %0.3f", p2x));
    check(near(pdv, 20.0), $sformatf("CLKDV period %0.3f", pdv));
    check(near(pfx, 4.0), $sformatf("CLKFX period %0.3f", pfx));
    check(c2x180 == ~c2x && cfx180 == ~cfx, "inverted outputs");
    // variable phase shift: 8 increments
    repeat (8) begin
      @(negedge psclk) psen = 1'b1;
      @(negedge psclk) psen = 1'b0;
      repeat (4) @(negedge psclk);
    end
    repeat (3) @(posedge clk);
    #(T - 0.5);
    check(ndone == 8, $sformatf("PSDONE pulses %0d", ndone));
    check(near(t0 - tin, 8.0 * T / 256.0), $sformatf("shifted CLK0 at %0.4f", t0 - tin));
    check(st[0] == 1'b0, "no overflow yet");
    // run past +255
    repeat (250) begin
      @(negedge psclk) psen = 1'b1;
      @(negedge psclk) psen = 1'b0;
      repeat (3) @(negedge psclk);
    end
    check(st[0] == 1'b1, "overflow flagged");
    check(st[2:1] == 2'b00 && bst[2:1] == 2'b00, "no stop flags while running");
    @(negedge clk) run = 1'b0;
    #(4.0 * T);
    check(st[2:1] == 2'b11, $sformatf("CLKIN/CLKFX stop flags %b", st[2:1]));
    check(bst[2:1] == 2'b11, $sformatf("second instance stop flags %b", bst[2:1]));
    run = 1'b1;
    #(10.0 * T);
    check(st[2:1] == 2'b00 && bst[2:1] == 2'b00,
          $sformatf("stop flags clear %b %b", st[2:1], bst[2:1]));
    rst = 1'b1; #1;
    check(!lk, "reset drops lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
