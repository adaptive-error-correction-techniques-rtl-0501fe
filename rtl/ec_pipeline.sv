// ec_pipeline: pulsed-latch Razor pipeline with one-cycle timing-error
// correction.
//
// Every stage register is a bank of Razor latches (main + shadow) with its
// own clock-gating control (ec_stage). When a stage detects a timing error,
// it restores the correct shadow value into its main latches at the next
// edge. Its output stages are kept from consuming the wrong value by a
// forward wave of CG requests (each stalls one stage for one edge). Its
// input stages are kept from losing data by a backward wave of MCG requests:
// such a stage gates only its main latch for one edge (the shadow keeps
// capturing), then restores it from the shadow. The two waves stop where they
// meet or cross, so the scheme also works with fan-in, fan-out and loops, and
// every error costs the pipeline's output exactly one cycle.
//
// Topology: stage 0 takes in_data directly; every other stage k takes the
// stage logic (a 16x16 multiplier on the sum of its input words) of the
// stages j with ADJ[k][j] = 1. Stage N-1 drives out_data. The defaults are
// the five-stage linear c6288-style pipeline; ec_pkg has the fan-in/fan-out
// and loop topologies.
//
// Interface and timing:
//   in_ready  high in the cycle before an edge at which stage 0's shadow
//             latch samples in_data, i.e. the source must present the next
//             word after such an edge and keep it otherwise (stage 0 sends its
//             MCG to the source as this ready going low).
//   out_valid high while out_data is a new, error-free result; the sequence
//             of out_data words taken when out_valid is high is the same as
//             that of the same pipeline without timing errors.
//   tmg_fault[k] emulates a late-arriving input at stage k's next normal
//             capture (see razor_reg); tie to 0 in silicon.
//   The stage_* outputs expose each stage's Razor error flag and its CG/MCG
//   protocol for observation.
// Reset (asynchronous, active low) clears all latches and requests; the
// document does not describe reset.
module ec_pipeline
  import ec_pkg::*;
#(
  parameter int unsigned N   = 5,
  parameter int unsigned W   = 32,
  parameter adj_t        ADJ = linear_adj(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic [N-1:0] tmg_fault,
  output logic [N-1:0] stage_err,
  output logic [N-1:0] stage_cg_out,
  output logic [N-1:0] stage_mcg_out,
  output logic [N-1:0] stage_cg_acc,
  output logic [N-1:0] stage_mcg_acc,
  output logic [N-1:0] stage_nullified,
  output logic [N-1:0] stage_restore,
  output logic [N-1:0] stage_hold
);

  logic [N-1:0][W-1:0] q;
  logic [N-1:0]        captured, en_m, en_s;
  stage_act_e          act [N];

  for (genvar k = 0; k < N; k++) begin : g_stage
    logic [W-1:0]        d;
    logic [N-1:0]        cg_in, mcg_in;
    logic [N-1:0][W-1:0] din;

    // CG arrives from input stages, MCG from output stages.
    for (genvar j = 0; j < N; j++) begin : g_link
      assign cg_in[j]  = ADJ[k][j] & stage_cg_out[j];
      assign mcg_in[j] = ADJ[j][k] & stage_mcg_out[j];
      assign din[j]    = ADJ[k][j] ? q[j] : '0;
    end

    if (k == 0) begin : g_first
      assign d = in_data;
    end else begin : g_logic
      stage_logic #(.W(W), .NI(N)) u_logic (.din, .dout(d));
    end

    ec_stage #(.W(W), .NI(N), .NO(N)) u_stage (
      .clk, .rst_n, .d,
      .tmg_fault (tmg_fault[k]),
      .mcg_in, .cg_in,
      .q         (q[k]),
      .err_any   (stage_err[k]),
      .mcg_out   (stage_mcg_out[k]),
      .cg_out    (stage_cg_out[k]),
      .en_clk_m  (en_m[k]),
      .en_clk_s  (en_s[k]),
      .restore   (stage_restore[k]),
      .act       (act[k]),
      .captured  (captured[k]),
      .cg_m      (stage_mcg_acc[k]),
      .cg_ms     (stage_cg_acc[k]),
      .nullified (stage_nullified[k])
    );

    assign stage_hold[k] = (act[k] == ACT_HOLD);
  end

  assign in_ready  = en_s[0];
  assign out_data  = q[N-1];
  assign out_valid = captured[N-1] & ~stage_err[N-1];

endmodule
