// ec_ctrl: clock-gating control of one Razor pipeline stage.
//
// Two kinds of one-cycle clock-gating requests travel between stages:
//   CG  goes forward, from a stage to its output stages. A stage that accepts
//       a CG gates both of its pulses at the next edge (it stalls), sends MCG
//       to all its input stages in the same cycle and forwards CG to its
//       output stages in the following cycle.
//   MCG goes backward, from a stage to its input stages. A stage that
//       accepts an MCG gates only its main pulse at the next edge (the shadow
//       still captures the data that arrives), then in the following cycle
//       gates both pulses, restores shadow -> main and sends MCG to its input
//       stages and CG to its output stages.
// A stage whose Razor latches flag an error sends CG and MCG at once, gates
// both pulses at the next edge and restores the correct shadow value into
// its main latches. The error of the cycle right after a main-only gating is
// ignored, because there main and shadow differ on purpose.
//
// Stop conditions: a stage that accepts CG and MCG in the same cycle stalls
// for one edge and forwards neither. A stage that, in this cycle, is itself
// sending a request (CG_out or the MCG of pre_MCG) or is restoring after its
// own error ignores every incoming request ("gated" low). A stage two cycles
// after accepting an MCG ignores incoming CG (ppre_MCG): that CG is the echo
// of its own MCG wave.
//
// The node names follow the printed control schematic (cg_m, cg_ms, cg_mq,
// pre_MCG, ppre_MCG, error_s, pre_error_s, gated, resb, CG_out, MCG_out,
// EN_clk_m, EN_clk_s, restore), and so do the gate functions on them. That
// schematic mixes level-sensitive latches on CLK and on its inverse with
// flip-flops on the falling edge; here every state element is a rising-edge
// flip-flop and a request sent in one cycle acts at the next edge. The
// request outputs are combinational from the state and the inputs, so the
// whole CG/MCG network settles within one cycle; CG_out depends on state
// only, which keeps the network free of combinational loops.
//
// Interface: mcg_in has one bit per output stage, cg_in one per input stage,
// err one per Razor latch of the stage (each is OR-reduced, as the bus
// inputs of the schematic's OR gates). en_clk_m / en_clk_s / restore apply to
// the next rising edge of clk.
module ec_ctrl #(
  parameter int unsigned W  = 32, // Razor latches in the stage
  parameter int unsigned NI = 1,  // input stages (CG sources)
  parameter int unsigned NO = 1   // output stages (MCG sources)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NO-1:0] mcg_in,
  input  logic [NI-1:0] cg_in,
  input  logic [W-1:0]  err,
  output logic          mcg_out,
  output logic          cg_out,
  output logic          en_clk_m,
  output logic          en_clk_s,
  output logic          restore,
  // observation of the protocol
  output logic          error_s,   // own error taken this cycle
  output logic          gated,     // incoming requests are accepted
  output logic          cg_m,      // MCG accepted this cycle
  output logic          cg_ms,     // CG accepted this cycle
  output logic          nullified  // an incoming request was ignored
);

  logic cg_mq, cg_msq, pre_error_s, ppre_mcg;
  logic pre_mcg, resb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cg_mq       <= 1'b0;
      cg_msq      <= 1'b0;
      pre_error_s <= 1'b0;
      ppre_mcg    <= 1'b0;
    end else begin
      cg_mq       <= cg_m;
      cg_msq      <= cg_ms;
      pre_error_s <= error_s;
      ppre_mcg    <= pre_mcg;
    end
  end

  always_comb begin
    error_s   = (|err) & ~cg_mq;
    pre_mcg   = cg_mq & ~cg_msq;
    cg_out    = error_s | (cg_mq ^ cg_msq);
    resb      = error_s | pre_mcg;
    gated     = ~(pre_mcg | cg_out | pre_error_s);
    cg_m      = (|mcg_in) & gated;
    cg_ms     = (|cg_in) & gated & ~ppre_mcg;
    mcg_out   = cg_ms | resb;
    en_clk_m  = ~(cg_m | mcg_out);
    en_clk_s  = ~mcg_out;
    restore   = resb;
    nullified = ((|mcg_in) & ~cg_m) | ((|cg_in) & ~cg_ms);
  end

  // A stage never restores while its main pulse is enabled.
  a_restore_gates_main: assert property (@(posedge clk) disable iff (!rst_n) restore |-> !en_clk_m && !en_clk_s);

endmodule
