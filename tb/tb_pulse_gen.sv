// tb_pulse_gen: each enabled rising clock edge gives exactly one pulse of
// the configured width (130 ps and 430 ps instances); a disabled edge gives
// none.
module tb_pulse_gen;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, en = 1'b1;
  always #750 clk = ~clk;
  logic pm, ps;
  int checks = 0, failures = 0;
  int n_pm = 0, n_ps = 0;
  time t_rise_m, t_rise_s;

  pulse_gen #(.WIDTH_PS(130)) u_m (.clk, .en, .pulse(pm));
  pulse_gen #(.WIDTH_PS(430)) u_s (.clk, .en, .pulse(ps));

  always @(posedge pm) begin t_rise_m = $time; n_pm++; end
  always @(posedge ps) begin t_rise_s = $time; n_ps++; end
  always @(negedge pm) if (n_pm > 0) begin checks++; if ($time - t_rise_m != 130) failures++; end
  always @(negedge ps) if (n_ps > 0) begin checks++; if ($time - t_rise_s != 430) failures++; end

  initial begin
    repeat (10) @(posedge clk);
    @(negedge clk); en = 1'b0;
    repeat (5) @(posedge clk);
    @(negedge clk); en = 1'b1;
    repeat (5) @(posedge clk);
    #1000;
    checks += 2;
    if (n_pm != 15) failures++;
    if (n_ps != 15) failures++;
    $display("pulses: %0d main, %0d shadow", n_pm, n_ps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
