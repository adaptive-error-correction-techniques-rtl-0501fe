// tb_ec_ctrl: directed test of one stage's clock-gating control.
// Each step applies the request and error inputs of one cycle and checks
// the outputs of that cycle (MCG_out, CG_out, EN_clk_m, EN_clk_s, restore,
// CG/MCG accepted) against the protocol:
//   own error          -> CG and MCG out, both pulses gated, restore;
//                         the next cycle ignores incoming requests
//   MCG accepted       -> only the main pulse gated; next cycle MCG and CG
//                         out, both gated, restore (the main/shadow
//                         difference of that cycle is not an error); the
//                         cycle after ignores CG but accepts MCG
//   CG accepted        -> MCG out in the same cycle, both gated; next cycle
//                         CG out, incoming MCG and CG ignored
//   CG and MCG at once -> both gated, nothing forwarded next cycle
module tb_ec_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] mcg_in, cg_in;
  logic [7:0] err;
  logic mcg_out, cg_out, en_clk_m, en_clk_s, restore, error_s, gated, cg_m, cg_ms, nullified;
  int checks = 0, failures = 0;

  ec_ctrl #(.W(8), .NI(2), .NO(2)) dut (.*);

  // inputs: mcg, cg, err ; expected: mcg_out cg_out en_m en_s restore cg_m cg_ms
  task automatic step(string tag, logic m, logic c, logic e, logic [6:0] exp);
    @(negedge clk);
    mcg_in = {1'b0, m};
    cg_in  = {c, 1'b0};
    err    = e ? 8'h10 : 8'h00;
    #1;
    checks++;
    if ({mcg_out, cg_out, en_clk_m, en_clk_s, restore, cg_m, cg_ms} !== exp) begin
      failures++;
      $display("%s: got %b expected %b", tag, {mcg_out, cg_out, en_clk_m, en_clk_s, restore, cg_m, cg_ms}, exp);
    end
  endtask

  initial begin
    mcg_in = '0; cg_in = '0; err = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    //                     m  c  e   mo co em es rs am ac
    step("idle",           0, 0, 0, 7'b0_0_1_1_0_0_0);
    // own error, then incoming requests are ignored for a cycle
    step("error",          0, 0, 1, 7'b1_1_0_0_1_0_0);
    step("after error",    1, 1, 0, 7'b0_0_1_1_0_0_0);
    step("idle",           0, 0, 0, 7'b0_0_1_1_0_0_0);
    // MCG from an output stage
    step("mcg accept",     1, 0, 0, 7'b0_0_0_1_0_1_0);
    step("mcg restore",    0, 1, 1, 7'b1_1_0_0_1_0_0);
    step("mcg echo CG",    0, 1, 0, 7'b0_0_1_1_0_0_0);
    step("mcg again",      1, 0, 0, 7'b0_0_0_1_0_1_0);
    step("mcg restore 2",  0, 0, 1, 7'b1_1_0_0_1_0_0);
    step("idle",           0, 0, 0, 7'b0_0_1_1_0_0_0);
    step("idle",           0, 0, 0, 7'b0_0_1_1_0_0_0);
    // CG from an input stage
    step("cg accept",      0, 1, 0, 7'b1_0_0_0_0_0_1);
    step("cg forward",     1, 0, 0, 7'b0_1_1_1_0_0_0);
    step("idle",           0, 0, 0, 7'b0_0_1_1_0_0_0);
    step("cg accept",      0, 1, 0, 7'b1_0_0_0_0_0_1);
    step("cg fwd + cg",    0, 1, 0, 7'b0_1_1_1_0_0_0);
    step("idle",           0, 0, 0, 7'b0_0_1_1_0_0_0);
    step("idle",           0, 0, 0, 7'b0_0_1_1_0_0_0);
    // CG and MCG meet
    step("meet",           1, 1, 0, 7'b1_0_0_0_0_1_1);
    step("after meet",     0, 0, 0, 7'b0_0_1_1_0_0_0);
    // error while a request arrives: the request is dropped
    step("error + mcg",    1, 1, 1, 7'b1_1_0_0_1_0_0);
    step("after error",    0, 0, 0, 7'b0_0_1_1_0_0_0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
