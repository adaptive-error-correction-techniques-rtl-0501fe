// tb_ec_topologies: the error-correction protocol on every pipeline shape
// used as an example or benchmark:
//   fanin4   stages A..D with a path A -> D (fan-out at A, fan-in at D):
//            error at A (the fan-in stage D must make C wait), error at D
//            (A feeds B and D, B must not sample a word twice), then
//            isolated random errors; a second copy with an error on a random
//            stage every N+1 cycles
//   loop5    stages A..E with a loop D -> B: errors before (A), inside (C)
//            and after (E, random) the loop; plus random errors
//   lin8/10  8- and 10-stage linear pipelines, random errors
//   fo5/8/10 the 5-, 8- and 10-stage pipelines with one skip path
//            (2->4, 3->6, 3->8), random errors
// Random errors are spaced N+1 cycles apart: the protocol corrects one
// error at a time (and the simultaneous pairs the stop conditions are made
// for); errors closer than the time the CG/MCG waves need to leave the
// pipeline can lose or duplicate words. Every output word is compared with
// an error-free model of the same topology and every error must cost
// exactly one output cycle and one source stall.
module tb_ec_topologies;
  import ec_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 9;
  logic done [NC];
  int c_chk [NC], c_fail [NC], c_err [NC], c_cg [NC], c_mcg [NC], c_meet [NC], c_null [NC], c_bub [NC];
  string names [NC] = '{"fanin4 iso", "fanin4 rand", "loop5 iso", "loop5 rand",
                        "lin8 rand", "lin10 rand", "fo5 rand", "fo8 rand", "fo10 rand"};

  `define CASE_PORTS(i) .clk, .rst_n, .done(done[i]), .checks(c_chk[i]), .failures(c_fail[i]), \
    .n_err(c_err[i]), .n_cg(c_cg[i]), .n_mcg(c_mcg[i]), .n_meet(c_meet[i]), .n_null(c_null[i]), \
    .n_bubble(c_bub[i])

  pipe_case #(.N(4), .ADJ(fanin_fanout_adj4()), .NOUT(500), .SPACING(11),
              .S1_CYC(4), .S1_MASK(4'b0001), .S2_CYC(20), .S2_MASK(4'b1000), .SEED(3))
    u0 (`CASE_PORTS(0));
  pipe_case #(.N(4), .ADJ(fanin_fanout_adj4()), .NOUT(1500), .SPACING(5), .SEED(4))
    u1 (`CASE_PORTS(1));
  pipe_case #(.N(5), .ADJ(loop_adj5()), .NOUT(500), .SPACING(12),
              .S1_CYC(4), .S1_MASK(5'b00001), .S2_CYC(20), .S2_MASK(5'b00100), .SEED(5))
    u2 (`CASE_PORTS(2));
  pipe_case #(.N(5), .ADJ(loop_adj5()), .NOUT(1500), .SPACING(6), .SEED(6))
    u3 (`CASE_PORTS(3));
  pipe_case #(.N(8), .ADJ(linear_adj(8)), .NOUT(1500), .SPACING(9), .SEED(7))
    u4 (`CASE_PORTS(4));
  pipe_case #(.N(10), .ADJ(linear_adj(10)), .NOUT(1500), .SPACING(11), .SEED(8))
    u5 (`CASE_PORTS(5));
  pipe_case #(.N(5), .ADJ(fig12_adj(5)), .NOUT(1500), .SPACING(6), .SEED(9))
    u6 (`CASE_PORTS(6));
  pipe_case #(.N(8), .ADJ(fig12_adj(8)), .NOUT(1500), .SPACING(9), .SEED(10))
    u7 (`CASE_PORTS(7));
  pipe_case #(.N(10), .ADJ(fig12_adj(10)), .NOUT(1500), .SPACING(11), .SEED(12))
    u8 (`CASE_PORTS(8));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NC; i++) wait (done[i]);
    @(posedge clk);
    for (int i = 0; i < NC; i++) begin
      $display("%-13s errors %4d  bubbles %4d  CG %4d  MCG %4d  meet %3d  nullified %4d  failures %0d",
               names[i], c_err[i], c_bub[i], c_cg[i], c_mcg[i], c_meet[i], c_null[i], c_fail[i]);
      checks   += c_chk[i] + 1;
      failures += c_fail[i];
      if (c_err[i] == 0 || c_cg[i] == 0 || c_mcg[i] == 0) failures++;
    end
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
