// tb_ec_pipeline: end-to-end test of the default pipeline (five linear
// stages, 32-bit words, 16x16 multiplier stage logic).
//
// Two copies of the default ec_pipeline run side by side:
//   u_iso   the two double-error cases of the stop conditions (errors in
//           stages A and C in the same cycle: CG and MCG meet in B; errors
//           in A and D in the same cycle: the requests cross between B and
//           C), then one error on a random stage every 13 cycles. Here every
//           error must cost exactly one output cycle and one source stall.
//   u_dense an error on a random stage every 6 cycles (N+1: the next error
//           comes as soon as the previous correction has left the
//           pipeline); again exactly one cycle per error.
// Each output word is compared with an error-free reference model. Every
// mechanism (error correction, CG and MCG acceptance, meeting requests,
// nullified requests, restore, stall, source stall) must occur.
module tb_ec_pipeline;
  import ec_pkg::*;

  localparam int unsigned N = 5;
  localparam int unsigned W = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  `define PIPE_PORTS(p) \
    logic [W-1:0] p``_in_data, p``_out_data; \
    logic p``_in_ready, p``_out_valid, p``_done; \
    logic [N-1:0] p``_fault, p``_err, p``_cg, p``_mcg, p``_cga, p``_mcga, p``_null, p``_rest, p``_hold; \
    int p``_checks, p``_fail, p``_n_err, p``_n_cg, p``_n_mcg, p``_n_meet, p``_n_null, p``_n_rest, p``_n_hold, p``_n_stall, p``_n_bub;

  `PIPE_PORTS(iso)
  `PIPE_PORTS(den)

  ec_pipeline u_iso (
    .clk, .rst_n, .in_data(iso_in_data), .in_ready(iso_in_ready),
    .out_data(iso_out_data), .out_valid(iso_out_valid), .tmg_fault(iso_fault),
    .stage_err(iso_err), .stage_cg_out(iso_cg), .stage_mcg_out(iso_mcg),
    .stage_cg_acc(iso_cga), .stage_mcg_acc(iso_mcga), .stage_nullified(iso_null),
    .stage_restore(iso_rest), .stage_hold(iso_hold)
  );

  pipe_harness #(.N(N), .W(W), .ADJ(linear_adj(N)), .NOUT(600), .SPACING(13),
                 .S1_CYC(10), .S1_MASK(5'b00101), .S2_CYC(30), .S2_MASK(5'b01001),
                 .SEED(11)) h_iso (
    .clk, .rst_n, .in_data(iso_in_data), .in_ready(iso_in_ready),
    .out_data(iso_out_data), .out_valid(iso_out_valid), .tmg_fault(iso_fault),
    .stage_err(iso_err), .stage_cg_acc(iso_cga), .stage_mcg_acc(iso_mcga),
    .stage_nullified(iso_null), .stage_restore(iso_rest), .stage_hold(iso_hold),
    .done(iso_done), .checks(iso_checks), .failures(iso_fail), .n_err(iso_n_err),
    .n_cg(iso_n_cg), .n_mcg(iso_n_mcg), .n_meet(iso_n_meet), .n_null(iso_n_null),
    .n_restore(iso_n_rest), .n_hold(iso_n_hold), .n_stall(iso_n_stall), .n_bubble(iso_n_bub)
  );

  ec_pipeline u_dense (
    .clk, .rst_n, .in_data(den_in_data), .in_ready(den_in_ready),
    .out_data(den_out_data), .out_valid(den_out_valid), .tmg_fault(den_fault),
    .stage_err(den_err), .stage_cg_out(den_cg), .stage_mcg_out(den_mcg),
    .stage_cg_acc(den_cga), .stage_mcg_acc(den_mcga), .stage_nullified(den_null),
    .stage_restore(den_rest), .stage_hold(den_hold)
  );

  pipe_harness #(.N(N), .W(W), .ADJ(linear_adj(N)), .NOUT(2000), .SPACING(6),
                 .SEED(23)) h_dense (
    .clk, .rst_n, .in_data(den_in_data), .in_ready(den_in_ready),
    .out_data(den_out_data), .out_valid(den_out_valid), .tmg_fault(den_fault),
    .stage_err(den_err), .stage_cg_acc(den_cga), .stage_mcg_acc(den_mcga),
    .stage_nullified(den_null), .stage_restore(den_rest), .stage_hold(den_hold),
    .done(den_done), .checks(den_checks), .failures(den_fail), .n_err(den_n_err),
    .n_cg(den_n_cg), .n_mcg(den_n_mcg), .n_meet(den_n_meet), .n_null(den_n_null),
    .n_restore(den_n_rest), .n_hold(den_n_hold), .n_stall(den_n_stall), .n_bubble(den_n_bub)
  );

  task automatic need(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (iso_done && den_done);
    @(posedge clk);
    checks   += iso_checks + den_checks;
    failures += iso_fail + den_fail;
    $display("isolated errors: %0d corrected, %0d bubbles, %0d source stalls", iso_n_err, iso_n_bub, iso_n_stall);
    $display("dense errors:    %0d corrected, %0d bubbles, %0d source stalls", den_n_err, den_n_bub, den_n_stall);
    need("errors corrected", iso_n_err + den_n_err);
    need("CG accepted (stall)", iso_n_cg + den_n_cg);
    need("MCG accepted (main gated)", iso_n_mcg + den_n_mcg);
    need("CG and MCG meet", iso_n_meet + den_n_meet);
    need("requests nullified", iso_n_null + den_n_null);
    need("shadow->main restores", iso_n_rest + den_n_rest);
    need("stage holds", iso_n_hold + den_n_hold);
    need("source stalls", iso_n_stall + den_n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
