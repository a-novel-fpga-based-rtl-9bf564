// tb_hrpwm_comparator: checks duty-command capture and the SETD/CLRD strobes.
// A free-running 3-bit count drives an 8-bit/5-bit comparator. Random duty
// commands are applied at random times; a reference model holds the command
// seen in the counter's last state and predicts setd, clrd and fine each
// cycle.
`timescale 1ns/1fs
module tb_hrpwm_comparator;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] dc = '0;
  logic [2:0] cnt = '0;
  logic       last, setd, clrd;
  logic [4:0] fine;
  int checks = 0, failures = 0;

  always #1.0 clk = ~clk;
  assign last = (cnt == 3'd7);

  hrpwm_comparator #(.DC_W(8), .FINE_W(5)) dut (
    .clk(clk), .rst_n(rst_n), .dc(dc), .cnt(cnt), .last(last),
    .setd(setd), .clrd(clrd), .fine(fine)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  logic [7:0] ref_dc = '0;

  initial begin
    #2.5 rst_n = 1'b1;
    repeat (600) begin
      @(posedge clk);
      if (last) ref_dc = dc;
      cnt <= cnt + 1'b1;
      #0.2;
      check(setd == (cnt == 3'd0 && ref_dc != 8'd0), $sformatf("setd cnt=%0d dc=%0d", cnt, ref_dc));
      check(clrd == (cnt == ref_dc[7:5]), $sformatf("clrd cnt=%0d dc=%0d", cnt, ref_dc));
      check(fine == ref_dc[4:0], "fine");
      if ($urandom_range(0, 3) == 0) dc = 8'($urandom_range(0, 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
