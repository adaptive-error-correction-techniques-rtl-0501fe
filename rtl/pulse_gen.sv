// pulse_gen: behavioural model of a gated pulse generator for pulsed latches.
//
// Not synthesizable: the pulse width is a delay. In silicon this is a
// local clock buffer that turns each rising edge of clk into a pulse of a
// chosen width (a delay chain and a gate). Each rising edge of clk at which
// en is high starts a pulse of WIDTH_PS picoseconds on pulse; when en is low
// at the edge the pulse is suppressed (clock gating by EN_clk_m / EN_clk_s).
// The available widths are 130, 170, 210, 250 and 430 ps; the main latches
// use 130 ps and the shadow latches 430 ps by default. Delays are in ps.
module pulse_gen #(
  parameter int unsigned WIDTH_PS = 130
) (
  input  logic clk,
  input  logic en,
  output logic pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  initial pulse = 1'b0;

  always @(posedge clk) begin
    if (en) begin
      pulse <= 1'b1;
      #(WIDTH_PS) pulse <= 1'b0;
    end
  end

endmodule
