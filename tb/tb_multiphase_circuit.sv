// tb_multiphase_circuit: checks the fractional delay of the multiphase
// circuit for P = 4. Four 10 ns clocks lag each other by 2.5 ns. A one-cycle
// strobe launched 0.1 ns after a phase-0 edge must appear on reset_o
// (s+1)*2.5 ns after that edge for select s, and last one period.
`timescale 1ns/1fs
module tb_multiphase_circuit;
  localparam realtime T = 10.0;
  logic [3:0] ph = '0;
  logic       rst_n = 1'b0, din = 1'b0, rst_o;
  logic [1:0] sel = '0;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g_clk
    initial begin
      #(T * real'(k) / 4.0);
      forever begin ph[k] = 1'b1; #(T/2.0); ph[k] = 1'b0; #(T/2.0); end
    end
  end

  multiphase_circuit #(.P(4)) dut (.ph_clk(ph), .rst_n(rst_n), .din(din), .sel(sel), .reset_o(rst_o));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  realtime t_rise = 0, t_fall = 0;
  always @(posedge rst_o) t_rise = $realtime;
  always @(negedge rst_o) t_fall = $realtime;

  initial begin
    #2000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    realtime t0;
    #(T + 1.0) rst_n = 1'b1;
    for (int r = 0; r < 3; r++)
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        @(posedge ph[0]); t0 = $realtime;
        #0.1 din = 1'b1;
        @(posedge ph[0]);
        #0.1 din = 1'b0;
        #(3.0 * T);
        check((t_rise - t0 - real'(s + 1) * T / 4.0) < 0.001 && (t0 + real'(s + 1) * T / 4.0 - t_rise) < 0.001,
              $sformatf("sel=%0d rise %0.3f after edge", s, t_rise - t0));
        check((t_fall - t_rise - T) < 0.001 && (T - (t_fall - t_rise)) < 0.001,
              $sformatf("sel=%0d width %0.3f", s, t_fall - t_rise));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
