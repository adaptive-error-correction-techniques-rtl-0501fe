// tb_razor_latch: the latch-level Razor latch clocked by two pulse
// generators (main 130 ps, shadow 430 ps) from a 1.5 ns clock, replaying
// the correction sequence of one instruction:
//   cycle 1  data arrives before the edge: main and shadow agree
//   cycle 2  data arrives 250 ps after the edge: the main pulse (130 ps) has
//            closed, the shadow pulse (430 ps) catches it -> error
//   cycle 3  both pulses gated, restore high: the main takes the shadow
//            value, error clears
//   cycle 4  normal capture resumes
//   cycle 5  data arrives 600 ps after the edge, after both pulses: neither
//            latch sees it and no error is flagged (outside the window)
// A second check sweeps the arrival time over the edge to find the error
// window, which must match the two pulse widths.
module tb_razor_latch;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 8;
  localparam int TC = 1500;

  logic clk = 1'b0;
  always #(TC/2) clk = ~clk;

  logic en_m = 1'b1, en_s = 1'b1, restore = 1'b0;
  logic clk_m, clk_s;
  logic [W-1:0] D, Q, SQN, error;
  int checks = 0, failures = 0;

  pulse_gen #(.WIDTH_PS(130)) u_pm (.clk, .en(en_m), .pulse(clk_m));
  pulse_gen #(.WIDTH_PS(430)) u_ps (.clk, .en(en_s), .pulse(clk_s));
  razor_latch #(.W(W)) dut (.D, .clk_m, .clk_s, .restore, .Q, .SQN, .error);

  task automatic expect_eq(string tag, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h at %0t", tag, got, exp, $time);
    end
  endtask

  // apply value v at offset ps after the next rising edge (negative: before)
  task automatic next_cycle(logic [W-1:0] v, int offset);
    if (offset < 0) begin
      #(TC/2 + offset);
      D = v;
      @(posedge clk);
    end else begin
      @(posedge clk);
      #(offset);
      D = v;
    end
  endtask

  initial begin
    D = 8'h00;
    // settle both latches
    @(posedge clk); @(posedge clk); @(negedge clk);
    // cycle 1: on time
    next_cycle(8'hA5, -100);
    #(700);
    expect_eq("c1 Q", Q, 8'hA5);
    expect_eq("c1 error", error, 8'h00);
    // cycle 2: late by 250 ps
    @(negedge clk); next_cycle(8'h3C, 250);
    #(450);
    expect_eq("c2 Q keeps old", Q, 8'hA5);
    expect_eq("c2 shadow new", ~SQN, 8'h3C);
    expect_eq("c2 error", error, 8'hA5 ^ 8'h3C);
    // cycle 3: gate both pulses, restore
    @(negedge clk); en_m = 1'b0; en_s = 1'b0;
    @(posedge clk); #(200);
    expect_eq("c3 gated", Q, 8'hA5);
    restore = 1'b1; #(300); restore = 1'b0;
    expect_eq("c3 restored", Q, 8'h3C);
    expect_eq("c3 error clear", error, 8'h00);
    // cycle 4: normal
    @(negedge clk); en_m = 1'b1; en_s = 1'b1; D = 8'h77;
    @(posedge clk); #(700);
    expect_eq("c4 Q", Q, 8'h77);
    expect_eq("c4 error", error, 8'h00);
    // cycle 5: too late for both
    @(negedge clk); next_cycle(8'h11, 600);
    #(100);
    expect_eq("c5 Q", Q, 8'h77);
    expect_eq("c5 error", error, 8'h00);
    // sweep of the arrival time (restore between steps)
    for (int off = 0; off <= 560; off += 40) begin
      logic exp_err;
      @(negedge clk); D = 8'h00;          // captured cleanly at the next edge
      @(posedge clk);
      @(negedge clk);
      next_cycle(8'hFF, off);
      #(600 - off);
      exp_err = (off > 130) && (off < 430);
      expect_eq($sformatf("sweep %0d", off), error, exp_err ? 8'hFF : 8'h00);
      // clean up: restore if needed
      @(negedge clk); en_m = 1'b0; en_s = 1'b0; restore = 1'b1;
      @(posedge clk); #(100); restore = 1'b0;
      @(negedge clk); en_m = 1'b1; en_s = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TC * 400);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
