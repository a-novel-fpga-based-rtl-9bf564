// tb_mmcm: checks the mixed-mode clock manager model with M = 8, D = 2 and
// O = {2, 4, 1, 8, 3, 5, 16} on a 5 ns input: each output period must be
// 5 * D * O / M ns and CLKFBOUT 10 ns; all outputs rise together at lock;
// gating the feedback for 30 ns raises only CLKFBSTOPPED, stopping the input
// for 30 ns raises only CLKINSTOPPED, and both fall once the clock is back;
// reset stops the outputs and drops LOCKED; they restart after relock.
`timescale 1ns/1fs
module tb_mmcm;
  localparam realtime T = 5.0, TOL = 0.001;
  localparam int unsigned OV [7] = '{2, 4, 1, 8, 3, 5, 16};
  logic clk = 1'b0, rst = 1'b1, fb, lk, in_stop, fb_stop;
  logic run = 1'b1, fb_en = 1'b1;
  logic [6:0] co;
  int checks = 0, failures = 0;

  always #(T/2.0) if (run) clk = ~clk;

  mmcm #(.M(8), .D(2), .O(OV)) dut (.CLKIN1(clk), .CLKFBIN(fb & fb_en), .RST(rst), .CLKOUT(co), .CLKFBOUT(fb),
                                          .LOCKED(lk), .CLKINSTOPPED(in_stop), .CLKFBSTOPPED(fb_stop));

  realtime last [7], per [7], tfirst [7];
  realtime lfb = 0, pfb = 0;
  for (genvar i = 0; i < 7; i++) begin : g_m
    initial begin last[i] = 0; per[i] = 0; tfirst[i] = -1; end
    always @(posedge co[i]) begin
      per[i] = $realtime - last[i]; last[i] = $realtime;
      if (tfirst[i] < 0) tfirst[i] = $realtime;
    end
  end
  always @(posedge fb) begin pfb = $realtime - lfb; lfb = $realtime; end

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
    #(2.0 * T + 0.1) rst = 1'b0;
    wait (lk);
    #(40.0 * T);
    for (int i = 0; i < 7; i++) begin
      check(near(per[i], T * 2.0 * real'(OV[i]) / 8.0), $sformatf("O%0d period %0.4f", i, per[i]));
      check(near(tfirst[i], tfirst[0]), $sformatf("O%0d starts with O0", i));
    end
    check(near(pfb, 2.0 * T), $sformatf("CLKFBOUT period %0.4f", pfb));
    check(!in_stop && !fb_stop, "no stop flags while running");
    // feedback path broken for 30 ns
    fb_en = 1'b0;
    #(6.0 * T);
    check(fb_stop && !in_stop, $sformatf("feedback stop: in=%0b fb=%0b", in_stop, fb_stop));
    fb_en = 1'b1;
    #(6.0 * T);
    check(!fb_stop, "feedback stop clears");
    // input clock held low for 30 ns; the outputs keep running
    @(negedge clk) run = 1'b0;
    #(6.0 * T);
    check(in_stop && !fb_stop, $sformatf("input stop: in=%0b fb=%0b", in_stop, fb_stop));
    check(near(per[0], T * 0.5), $sformatf("O0 runs through the stop %0.4f", per[0]));
    run = 1'b1;
    #(10.0 * T);
    check(!in_stop, "input stop clears");
    rst = 1'b1;
    #0.1 check(!lk && co == '0, $sformatf("reset stops outputs lk=%0b co=%b", lk, co));
    #(10.0 * T);
    check(co == '0, "outputs stay stopped in reset");
    rst = 1'b0;
    wait (lk);
    #(40.0 * T);
    check(near(per[1], T), $sformatf("O1 after relock %0.4f", per[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
