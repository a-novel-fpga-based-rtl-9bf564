// tb_hrpwm_sr_ff: checks the edge-triggered set/reset flip-flop.
// Sequences: set then reset; repeated sets; repeated resets; a reset pulse
// still high when set rises (the output must go high: last edge wins); a set
// pulse still high when reset rises (the output must go low); async reset.
`timescale 1ns/1fs
module tb_hrpwm_sr_ff;
  logic rst_n = 1'b1, s = 1'b0, r = 1'b0, q;
  int checks = 0, failures = 0;

  hrpwm_sr_ff dut (.rst_n(rst_n), .set_i(s), .reset_i(r), .q(q));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_s(); s = 1'b1; #1; s = 1'b0; #1; endtask
  task automatic pulse_r(); r = 1'b1; #1; r = 1'b0; #1; endtask

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    #0.5 rst_n = 1'b0;
    #0.5 check(q == 1'b0, "reset state");
    rst_n = 1'b1; #1;
    pulse_s(); check(q == 1'b1, "set");
    pulse_r(); check(q == 1'b0, "reset");
    pulse_s(); pulse_s(); check(q == 1'b1, "set twice");
    pulse_r(); pulse_r(); check(q == 1'b0, "reset twice");
    pulse_r(); check(q == 1'b0, "reset while low");
    // reset high, then set rises: set wins
    r = 1'b1; #1; s = 1'b1; #0.5; check(q == 1'b1, "set during reset level");
    r = 1'b0; #0.5; check(q == 1'b1, "stays set after reset falls");
    // set high, then reset rises: reset wins
    #1; r = 1'b1; #0.5; check(q == 1'b0, "reset during set level");
    s = 1'b0; #0.5; r = 1'b0; #1; check(q == 1'b0, "stays reset");
    for (int i = 0; i < 20; i++) begin
      pulse_s(); check(q == 1'b1, "loop set");
      pulse_r(); check(q == 1'b0, "loop reset");
    end
    pulse_s();
    rst_n = 1'b0; #0.1 check(q == 1'b0, "async clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
