// razor_latch: pulsed Razor latch with shadow-to-main restore, latch level.
//
// Behavioural-level description of the transistor schematic, kept
// synthesizable as level-sensitive latches (the latches are the point of
// this cell, so the latch inference that lint and synthesis report is
// intended). Per bit:
//   main latch    transparent while the short pulse clk_m is high and stores
//                 ~D; while clk_m is low its feedback loop passes through a
//                 multiplexer, which with restore = 1 takes the shadow node
//                 instead of its own value (shadow -> main restore without an
//                 extra multiplexer on the D path).
//   shadow latch  transparent while the longer pulse clk_s is high, stores
//                 ~D; SQN is that node.
//   Q             = inverted main node (= D captured by the main pulse).
//   error         = XNOR(Q, SQN): high when main and shadow captured
//                   different values, i.e. D changed after the main pulse
//                   closed but inside the shadow pulse (a timing error).
// Timing: D must settle before clk_m falls to avoid an error and before
// clk_s falls to be corrected. restore is applied while both pulses are
// gated, in the cycle after the error. The storage polarities follow the
// schematic; W parallel bits share the clocks and restore.
module razor_latch #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] D,
  input  logic         clk_m,
  input  logic         clk_s,
  input  logic         restore,
  output logic [W-1:0] Q,
  output logic [W-1:0] SQN,
  output logic [W-1:0] error
);

  logic [W-1:0] main_n, shadow_n;

  always_latch begin
    if (clk_m)        main_n = ~D;
    else if (restore) main_n = shadow_n;
  end

  always_latch begin
    if (clk_s) shadow_n = ~D;
  end

  assign Q     = ~main_n;
  assign SQN   = shadow_n;
  assign error = ~(Q ^ SQN);

endmodule
