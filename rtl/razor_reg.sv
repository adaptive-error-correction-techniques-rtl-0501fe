// razor_reg: cycle-level model of the W Razor latches of one pipeline stage.
//
// Each bit has a main latch (clocked by a short pulse, clk_m) and a shadow
// latch (clocked by a longer pulse, clk_s, so it still catches late data).
// At this level of abstraction one rising edge of clk stands for one pair of
// pulses:
//   en_m = 1            main and shadow both capture d (normal operation)
//   en_m = 0, en_s = 1  main keeps its value, shadow captures d
//   en_s = 0            shadow keeps its value; if restore = 1 the main takes
//                       the shadow value (the restore multiplexer sits in the
//                       main latch feedback path), otherwise the main keeps
// err[i] is high while bit i of the main and shadow latches differ, i.e. in
// the cycle after that main latch missed late data (the XNOR comparator of
// each Razor latch). q is the main latch output.
//
// A real timing error comes from a path that is slower than the main pulse.
// RTL has no path delays, so the input tmg_fault stands for "the data of this
// capture arrives after the main pulse": on such a normal capture the main
// stores d ^ FAULT_MASK while the shadow still stores d. Tie it to 0 in
// silicon. Reset clears both latches (the document does not describe reset).
module razor_reg #(
  parameter int unsigned W          = 32,
  parameter logic [W-1:0] FAULT_MASK = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_m,      // EN_clk_m: main pulse enabled this edge
  input  logic         en_s,      // EN_clk_s: shadow pulse enabled this edge
  input  logic         restore,   // shadow -> main this edge (main pulse gated)
  input  logic         tmg_fault, // emulated late arrival for this capture
  input  logic [W-1:0] d,
  output logic [W-1:0] q,         // main latch
  output logic [W-1:0] sq,        // shadow latch
  output logic [W-1:0] err        // per-bit main != shadow
);

  logic [W-1:0] main_q, shadow_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_q   <= '0;
      shadow_q <= '0;
    end else begin
      if (en_m)         main_q <= tmg_fault ? (d ^ FAULT_MASK) : d;
      else if (restore) main_q <= shadow_q;
      if (en_s)         shadow_q <= d;
    end
  end

  assign q   = main_q;
  assign sq  = shadow_q;
  assign err = main_q ^ shadow_q;

  // The control logic never opens the main pulse while the shadow is gated,
  // and never restores while the main pulse is open.
  a_main_implies_shadow: assert property (@(posedge clk) disable iff (!rst_n) en_m |-> en_s);
  a_no_restore_on_capture: assert property (@(posedge clk) disable iff (!rst_n) restore |-> !en_m && !en_s);

endmodule
