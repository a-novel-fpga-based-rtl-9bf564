// tb_iodelaye1: checks the I/O delay model. Loadable-variable instance:
// RST loads CNTVALUEIN on the next C edge (the Fig.-style sequence 3 -> 19);
// every tap 0..31 delays a DATAIN edge by tap * 78.125 ps; CE/INC step the
// tap up and down with wraparound. Fixed instance: the tap stays at INIT_TAP
// whatever the controls do. Variable instance: RST returns to INIT_TAP.
`timescale 1ns/1fs
module tb_iodelaye1;
  import hrpwm_pkg::*;
  localparam realtime TAP = 0.078125, TOL = 0.0005;
  logic c = 1'b0, rst = 1'b0, ce = 1'b0, inc = 1'b0, din = 1'b0;
  logic [4:0] cin = 5'd3;
  logic dl, df, dv;
  logic [4:0] tl, tf, tv;
  int checks = 0, failures = 0;

  always #1.25 c = ~c;

  iodelaye1 #(.MODE(IOD_VAR_LOADABLE))          u_l (.C(c), .RST(rst), .CE(ce), .INC(inc), .CNTVALUEIN(cin), .DATAIN(din), .DATAOUT(dl), .CNTVALUEOUT(tl));
  iodelaye1 #(.MODE(IOD_FIXED), .INIT_TAP(7))   u_f (.C(c), .RST(rst), .CE(ce), .INC(inc), .CNTVALUEIN(cin), .DATAIN(din), .DATAOUT(df), .CNTVALUEOUT(tf));
  iodelaye1 #(.MODE(IOD_VARIABLE), .INIT_TAP(4)) u_v (.C(c), .RST(rst), .CE(ce), .INC(inc), .CNTVALUEIN(cin), .DATAIN(din), .DATAOUT(dv), .CNTVALUEOUT(tv));

  realtime tin = 0, tl_out = 0, tf_out = 0;
  always @(posedge din) tin = $realtime;
  always @(posedge dl)  tl_out = $realtime;
  always @(posedge df)  tf_out = $realtime;

  function automatic bit near(realtime a, realtime b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic load(input logic [4:0] v);
    @(negedge c) begin cin = v; rst = 1'b1; end
    @(negedge c) rst = 1'b0;
  endtask
  task automatic edge_test(input int tap);
    @(negedge c) din = 1'b1;
    #2.6;
    check(near(tl_out - tin, real'(tap) * TAP), $sformatf("tap %0d delay %0.5f", tap, tl_out - tin));
    check(near(tf_out - tin, 7.0 * TAP), "fixed tap delay");
    @(negedge c) din = 1'b0;
  endtask

  initial begin
    #5000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    load(5'd3);
    check(tl == 5'd3, "CNTVALUEOUT = 3");
    @(negedge c) cin = 5'd19;
    @(negedge c);
    check(tl == 5'd3, "no load without RST");
    load(5'd19);
    check(tl == 5'd19, "CNTVALUEOUT = 19");
    for (int t = 0; t < 32; t++) begin
      load(5'(t));
      edge_test(t);
    end
    // CE/INC
    load(5'd30);
    @(negedge c) begin ce = 1'b1; inc = 1'b1; end
    @(negedge c); @(negedge c);
    ce = 1'b0;
    check(tl == 5'd0, $sformatf("wrap up: %0d", tl));
    check(tf == 5'd7, "fixed ignores CE");
    @(negedge c) begin ce = 1'b1; inc = 1'b0; end
    @(negedge c) ce = 1'b0;
    check(tl == 5'd31, $sformatf("wrap down: %0d", tl));
    load(5'd12);
    check(tv == 5'd4, $sformatf("variable RST -> INIT_TAP: %0d", tv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
