// pipe_case: one ec_pipeline of a given size and topology together with its
// stimulus/checker (pipe_harness). Used to run several topologies side by
// side in one testbench.
module pipe_case
  import ec_pkg::*;
#(
  parameter int unsigned N        = 5,
  parameter adj_t        ADJ      = linear_adj(5),
  parameter int unsigned NOUT     = 400,
  parameter int unsigned SPACING  = 0,
  parameter int unsigned PROB_PM  = 0,
  parameter int unsigned S1_CYC   = 0,
  parameter logic [N-1:0] S1_MASK = '0,
  parameter int unsigned S2_CYC   = 0,
  parameter logic [N-1:0] S2_MASK = '0,
  parameter int unsigned SEED     = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_err,
  output int   n_cg,
  output int   n_mcg,
  output int   n_meet,
  output int   n_null,
  output int   n_bubble
);
  localparam int unsigned W = 32;

  logic [W-1:0] in_data, out_data;
  logic in_ready, out_valid;
  logic [N-1:0] fault, err, cg, mcg, cga, mcga, nul, rest, hold;
  int n_restore, n_hold, n_stall;

  ec_pipeline #(.N(N), .W(W), .ADJ(ADJ)) u_dut (
    .clk, .rst_n, .in_data, .in_ready, .out_data, .out_valid, .tmg_fault(fault),
    .stage_err(err), .stage_cg_out(cg), .stage_mcg_out(mcg), .stage_cg_acc(cga),
    .stage_mcg_acc(mcga), .stage_nullified(nul), .stage_restore(rest), .stage_hold(hold)
  );

  pipe_harness #(.N(N), .W(W), .ADJ(ADJ), .NOUT(NOUT), .SPACING(SPACING), .PROB_PM(PROB_PM),
                 .S1_CYC(S1_CYC), .S1_MASK(S1_MASK), .S2_CYC(S2_CYC), .S2_MASK(S2_MASK),
                 .SEED(SEED)) u_h (
    .clk, .rst_n, .in_data, .in_ready, .out_data, .out_valid, .tmg_fault(fault),
    .stage_err(err), .stage_cg_acc(cga), .stage_mcg_acc(mcga), .stage_nullified(nul),
    .stage_restore(rest), .stage_hold(hold), .done, .checks, .failures, .n_err,
    .n_cg, .n_mcg, .n_meet, .n_null, .n_restore, .n_hold, .n_stall, .n_bubble
  );
endmodule
