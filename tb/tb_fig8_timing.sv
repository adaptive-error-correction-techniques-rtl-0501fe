// tb_fig8_timing: pulse widths, time borrowing and the shadow-latch
// constraint on four latch-level Razor latches (fig8_circuit) with a 1.5 ns
// clock, 100 ps main pulses on a and b, 200 ps on d and 600 ps shadow pulses.
// Three copies differ only in the main pulse of latch c: 130, 300 and
// 500 ps (300 plus the 200 ps increase discussed for this example).
//
// Test B (b -> c, 1.8 ns): data launched by b arrives 300 ps after c's edge.
//   c main 130: timing error at c, shadow correct.
//   c main 300 or 500: no error, c borrows 300 ps; c's late departure makes
//   d flag an error next cycle (arrival 500 ps after d's edge), which d's
//   shadow still catches.
//   c main 130: c captures at its next rising edge, so c -> d (1.7 ns) lands
//   200 ps after d's edge, inside d's 200 ps main pulse: no error at d.
// Test A (a -> c, 2.0 ns): arrival 500 ps after c's edge.
//   c main 300: error at c, shadow correct.
//   c main 500: no error at c, but c departs 500 ps late and its data reach
//   d 700 ps after d's edge, after d's 600 ps shadow pulse: d's shadow holds
//   the old value and no error is flagged. This is the case the shadow
//   constraint d(path) <= Tc + Ws(d) - Wm(c) excludes; the testbench
//   computes that constraint and checks the outcome against it.
module tb_fig8_timing;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int TC = 1500;

  logic clk = 1'b0;
  always #(TC/2) clk = ~clk;

  logic da = 1'b0, db = 1'b0;
  logic qc [3], sc [3], ec [3], qd [3], sd [3], ed [3];
  localparam int WMC [3] = '{130, 300, 500};
  int checks = 0, failures = 0;
  logic shadow_ok;

  fig8_circuit #(.WM_C(130)) u130 (.clk, .da, .db, .qc(qc[0]), .sc(sc[0]), .err_c(ec[0]), .qd(qd[0]), .sd(sd[0]), .err_d(ed[0]));
  fig8_circuit #(.WM_C(300)) u300 (.clk, .da, .db, .qc(qc[1]), .sc(sc[1]), .err_c(ec[1]), .qd(qd[1]), .sd(sd[1]), .err_d(ed[1]));
  fig8_circuit #(.WM_C(500)) u500 (.clk, .da, .db, .qc(qc[2]), .sc(sc[2]), .err_c(ec[2]), .qd(qd[2]), .sd(sd[2]), .err_d(ed[2]));

  task automatic chk(string tag, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0b expected %0b at %0t", tag, got, exp, $time);
    end
  endtask

  // wait for the rising edge, then to 700 ps after it (all pulses closed)
  task automatic after_edge();
    @(posedge clk); #(700);
  endtask

  task automatic settle();
    repeat (5) after_edge();
    for (int i = 0; i < 3; i++) begin
      chk($sformatf("settled err_c %0d", WMC[i]), ec[i], 1'b0);
      chk($sformatf("settled err_d %0d", WMC[i]), ed[i], 1'b0);
    end
  endtask

  initial begin
    settle();
    // ---- test B: b -> c ----
    @(negedge clk); db = 1'b1;
    after_edge();                                   // E0: b launches
    after_edge();                                   // E1: arrival at c +300
    chk("B c130 err_c", ec[0], 1'b1);
    chk("B c130 qc old", qc[0], 1'b0);
    chk("B c130 shadow", sc[0], 1'b1);
    chk("B c300 err_c", ec[1], 1'b0);
    chk("B c300 qc", qc[1], 1'b1);
    chk("B c500 err_c", ec[2], 1'b0);
    chk("B c500 qc", qc[2], 1'b1);
    after_edge();                                   // E2
    chk("B c130 qc at edge", qc[0], 1'b1);
    chk("B c130 err_c clear", ec[0], 1'b0);
    chk("B c300 err_d (late departure)", ed[1], 1'b1);
    chk("B c300 d shadow", sd[1], 1'b1);
    chk("B c500 err_d (late departure)", ed[2], 1'b1);
    chk("B c500 d shadow", sd[2], 1'b1);
    after_edge();                                   // E3: c -> d within 200 ps
    chk("B c130 err_d", ed[0], 1'b0);
    chk("B c130 qd", qd[0], 1'b1);
    chk("B c300 qd", qd[1], 1'b1);
    chk("B c500 qd", qd[2], 1'b1);
    @(negedge clk); db = 1'b0;
    settle();
    // ---- test A: a -> c ----
    @(negedge clk); da = 1'b1;
    after_edge();                                   // E0
    after_edge();                                   // E1: arrival at c +500
    chk("A c130 err_c", ec[0], 1'b1);
    chk("A c300 err_c", ec[1], 1'b1);
    chk("A c300 qc old", qc[1], 1'b0);
    chk("A c300 shadow", sc[1], 1'b1);
    chk("A c500 err_c (borrowed)", ec[2], 1'b0);
    chk("A c500 qc", qc[2], 1'b1);
    after_edge();                                   // E2
    // c main 500: c -> d launched at the end of c's pulse; the shadow of d
    // holds the new value only if the shadow constraint holds (it does not).
    shadow_ok = (1700 <= TC + 600 - WMC[2]);
    chk("A c500 d shadow vs constraint", sd[2], shadow_ok);
    chk("A c500 err_d (undetected)", ed[2], 1'b0);
    chk("A c500 qd old", qd[2], 1'b0);
    chk("A c300 err_d", ed[1], 1'b0);
    chk("A c300 qc at edge", qc[1], 1'b1);
    after_edge();                                   // E3
    chk("A c300 qd", qd[1], 1'b1);
    chk("A c300 err_d", ed[1], 1'b0);
    chk("A c500 qd", qd[2], 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TC * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
