// tb_ec_stage: one Razor stage with its control, driven as if it sat in a
// pipeline. Checked: normal capture; an emulated late arrival raises the
// error, sends CG and MCG, and the next edge restores the correct word;
// an MCG from the output side holds the main value for one edge while the
// shadow takes the new word, which then reaches the main latch after one
// more edge; a CG from the input side stalls the stage for one edge.
module tb_ec_stage;
  import ec_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] d, q;
  logic tmg_fault, err_any, mcg_out, cg_out, en_clk_m, en_clk_s, restore, captured, cg_m, cg_ms, nullified;
  logic [0:0] mcg_in, cg_in;
  stage_act_e act;
  int checks = 0, failures = 0;

  ec_stage #(.W(32), .NI(1), .NO(1)) dut (.*);

  task automatic expect_eq(string tag, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", tag, got, exp);
    end
  endtask

  task automatic cyc(logic [31:0] dv, logic f, logic m, logic c);
    @(negedge clk);
    d = dv; tmg_fault = f; mcg_in = m; cg_in = c;
    #1;
  endtask

  initial begin
    d = '0; tmg_fault = 0; mcg_in = '0; cg_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    cyc(32'h1111, 0, 0, 0);
    cyc(32'h2222, 0, 0, 0); expect_eq("capture", q, 32'h1111);
    expect_eq("captured flag", captured, 1);
    // late arrival of 0x2222
    cyc(32'h3333, 1, 0, 0); expect_eq("before fault", q, 32'h2222);
    cyc(32'h3333, 0, 0, 0);
    expect_eq("faulty main", q, 32'h3332);
    expect_eq("error flag", err_any, 1);
    expect_eq("CG/MCG out", {cg_out, mcg_out, en_clk_m, en_clk_s, restore}, 5'b11001);
    expect_eq("act restore", act, ACT_RESTORE);
    cyc(32'h3333, 0, 0, 0);
    expect_eq("restored", q, 32'h3333);
    expect_eq("captured after restore", captured, 1);
    expect_eq("no error", err_any, 0);
    cyc(32'h4444, 0, 0, 0); expect_eq("next", q, 32'h3333);
    // MCG from the output side
    cyc(32'h5555, 0, 1, 0); expect_eq("before mcg", q, 32'h4444);
    expect_eq("gate main", act, ACT_GATE_MAIN);
    cyc(32'h6666, 0, 0, 0);
    expect_eq("main held", q, 32'h4444);
    expect_eq("MCG/CG out", {cg_out, mcg_out, restore}, 3'b111);
    cyc(32'h6666, 0, 0, 0);
    expect_eq("shadow restored", q, 32'h5555);
    cyc(32'h7777, 0, 0, 0);
    expect_eq("resumes", q, 32'h6666);
    // CG from the input side
    cyc(32'h8888, 0, 0, 1); expect_eq("before cg", q, 32'h7777);
    expect_eq("MCG back", mcg_out, 1);
    expect_eq("stall", act, ACT_HOLD);
    cyc(32'h8888, 0, 0, 0);
    expect_eq("held", q, 32'h7777);
    expect_eq("CG forwarded", cg_out, 1);
    expect_eq("not captured", captured, 0);
    cyc(32'h9999, 0, 0, 0);
    expect_eq("after stall", q, 32'h8888);
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
