// tb_idelayctrl: RDY must stay low for CAL_CYCLES-1 reference edges after
// RST falls, rise on edge CAL_CYCLES, stay high, and drop at once on RST.
`timescale 1ns/1fs
module tb_idelayctrl;
  logic clk = 1'b0, rst = 1'b1, rdy;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;
  idelayctrl #(.CAL_CYCLES(16)) dut (.REFCLK(clk), .RST(rst), .RDY(rdy));
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #2000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    for (int r = 0; r < 2; r++) begin
      @(negedge clk) rst = 1'b0;
      for (int n = 1; n <= 20; n++) begin
        @(posedge clk); #0.1;
        check(rdy == (n >= 16), $sformatf("edge %0d rdy=%0b", n, rdy));
      end
      #1 rst = 1'b1;
      #0.1 check(!rdy, "RST clears RDY");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
