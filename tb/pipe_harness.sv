// pipe_harness: stimulus and checker for one ec_pipeline instance.
//
// It feeds the pipeline a deterministic word stream (word p = mix(p)),
// honouring in_ready, and injects emulated timing errors through tmg_fault:
// two scripted events (cycle, stage mask), then either one error on a random
// stage every SPACING cycles or, if PROB_PM > 0, an error on every stage
// with probability PROB_PM/1000 per cycle. Injection stops NQUIET outputs
// before the end so that the last bubble leaves the pipeline.
//
// Reference: an error-free model of the same topology (registers advanced
// once per produced output, stage function = product of the halves of the
// sum of the input words) predicts every output word; each out_valid word is
// compared with it. The one-cycle penalty is checked by counting the cycles
// without a valid output: they must not exceed the number of corrected
// errors (with isolated errors they must equal the number of cycles in which
// an error was flagged), and the same for the
// cycles in which the source was stalled. The protocol events (CG and MCG
// accepted, requests meeting in a stage, requests nullified, restores,
// stalls) are counted for the caller.
module pipe_harness
  import ec_pkg::*;
#(
  parameter int unsigned N        = 5,
  parameter int unsigned W        = 32,
  parameter adj_t        ADJ      = linear_adj(5),
  parameter int unsigned NOUT     = 400,
  parameter int unsigned NQUIET   = 40,
  parameter int unsigned SPACING  = 0,
  parameter int unsigned PROB_PM  = 0,
  parameter int unsigned S1_CYC   = 0,
  parameter logic [N-1:0] S1_MASK = '0,
  parameter int unsigned S2_CYC   = 0,
  parameter logic [N-1:0] S2_MASK = '0,
  parameter int unsigned SEED     = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] in_data,
  input  logic         in_ready,
  input  logic [W-1:0] out_data,
  input  logic         out_valid,
  output logic [N-1:0] tmg_fault,
  input  logic [N-1:0] stage_err,
  input  logic [N-1:0] stage_cg_acc,
  input  logic [N-1:0] stage_mcg_acc,
  input  logic [N-1:0] stage_nullified,
  input  logic [N-1:0] stage_restore,
  input  logic [N-1:0] stage_hold,
  output logic         done,
  output int           checks,
  output int           failures,
  output int           n_err,
  output int           n_cg,
  output int           n_mcg,
  output int           n_meet,
  output int           n_null,
  output int           n_restore,
  output int           n_hold,
  output int           n_stall,
  output int           n_bubble
);

  localparam int unsigned H = W / 2;

  function automatic logic [W-1:0] mix(int unsigned p);
    logic [31:0] x;
    x = p * 32'h9E3779B1 + 32'h7F4A7C15;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12);
    return W'(x);
  endfunction

  // Error-free reference state.
  logic [W-1:0] ref_q [N];
  int unsigned  ref_steps;

  task automatic ref_step();
    logic [W-1:0] nxt [N];
    logic [W-1:0] acc;
    for (int k = 0; k < N; k++) begin
      if (k == 0) nxt[k] = mix(ref_steps);
      else begin
        acc = '0;
        for (int j = 0; j < N; j++) if (ADJ[k][j]) acc = acc + ref_q[j];
        nxt[k] = W'(acc[W-1:H] * acc[H-1:0]);
      end
    end
    for (int k = 0; k < N; k++) ref_q[k] = nxt[k];
    ref_steps++;
  endtask

  int unsigned p, cyc, outs, eff_err, err_cyc, seen_first;
  logic [N-1:0] captured_prev;
  logic         inject_on;

  assign in_data   = mix(p);
  assign inject_on = (outs + NQUIET < NOUT);

  initial begin
    for (int k = 0; k < N; k++) ref_q[k] = '0;
    ref_steps = 0;
    p = 0; cyc = 0; outs = 0; eff_err = 0; err_cyc = 0; seen_first = 0;
    checks = 0; failures = 0; done = 1'b0;
    n_err = 0; n_cg = 0; n_mcg = 0; n_meet = 0; n_null = 0;
    n_restore = 0; n_hold = 0; n_stall = 0; n_bubble = 0;
    tmg_fault = '0;
    void'($urandom(SEED));
  end

  // Fault pattern for the next edge.
  always @(negedge clk) begin
    logic [N-1:0] f;
    f = '0;
    if (rst_n && inject_on && !done) begin
      if (S1_CYC != 0 && cyc + 1 == S1_CYC) f |= S1_MASK;
      if (S2_CYC != 0 && cyc + 1 == S2_CYC) f |= S2_MASK;
      if (SPACING != 0 && cyc > S2_CYC + 4 && (cyc % SPACING) == 0)
        f[$urandom_range(N-1, 0)] = 1'b1;
      if (PROB_PM != 0)
        for (int k = 0; k < N; k++) if ($urandom_range(999, 0) < PROB_PM) f[k] = 1'b1;
    end
    tmg_fault = f;
  end

  always @(posedge clk) begin
    if (rst_n && !done) begin
      cyc++;
      if (in_ready) p++;
      else          n_stall++;
      // events of the cycle that ends at this edge
      n_cg      += $countones(stage_cg_acc);
      n_mcg     += $countones(stage_mcg_acc);
      n_meet    += $countones(stage_cg_acc & stage_mcg_acc);
      n_null    += $countones(stage_nullified);
      n_restore += $countones(stage_restore);
      n_hold    += $countones(stage_hold);
      if (|(stage_err & captured_prev)) err_cyc++;
      for (int k = 0; k < N; k++)
        if (stage_err[k] && captured_prev[k]) eff_err++;
      if (out_valid) begin
        seen_first = 1;
        ref_step();
        checks++;
        if (out_data !== ref_q[N-1]) begin
          failures++;
          if (failures < 10)
            $display("  %m output %0d: got %h expected %h (cycle %0d)", outs, out_data, ref_q[N-1], cyc);
        end
        outs++;
      end else if (seen_first) begin
        n_bubble++;
      end
      if (outs == NOUT) begin
        done = 1'b1;
        n_err = eff_err;
        checks++;
        if (n_bubble > eff_err) begin
          failures++;
          $display("  %0d output bubbles for %0d corrected errors", n_bubble, eff_err);
        end
        if (PROB_PM == 0) begin
          checks += 2;
          if (n_bubble != err_cyc) begin
            failures++;
            $display("  isolated errors: %0d bubbles, %0d error cycles", n_bubble, err_cyc);
          end
          if (n_stall != err_cyc) begin
            failures++;
            $display("  isolated errors: %0d source stalls, %0d error cycles", n_stall, err_cyc);
          end
        end
      end
    end
  end

  // captured[k] of the DUT is not a port; rebuild it: a stage whose error
  // flag is raised right after a main-only gating is not a real error. The
  // flag after a main-only gating coincides with the restore the stage
  // performs next, and that restore follows an accepted MCG.
  logic [N-1:0] mcg_acc_q;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) mcg_acc_q <= '0;
    else        mcg_acc_q <= stage_mcg_acc & ~stage_cg_acc;
  end
  assign captured_prev = ~mcg_acc_q;

endmodule
