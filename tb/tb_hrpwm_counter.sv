// tb_hrpwm_counter: checks the coarse counter against a reference count.
// A 4-bit instance runs for 40 cycles after an asynchronous reset; every
// cycle the count must equal (cycles since reset) mod 16 and `last` must be
// high exactly when the count is 15. A second reset mid-run must clear it.
`timescale 1ns/1fs
module tb_hrpwm_counter;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] cnt;
  logic       last;
  int checks = 0, failures = 0;

  always #1.0 clk = ~clk;

  hrpwm_counter #(.W(4)) dut (.clk(clk), .rst_n(rst_n), .cnt(cnt), .last(last));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    int n = 0;
    #3.3 check(cnt == 4'd0, "reset value");
    rst_n = 1'b1;
    repeat (40) begin
      @(posedge clk); #0.1;
      n++;
      check(cnt == 4'(n), $sformatf("count %0d want %0d", cnt, n % 16));
      check(last == (n % 16 == 15), $sformatf("last at count %0d", cnt));
    end
    rst_n = 1'b0;
    #0.1 check(cnt == 4'd0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
