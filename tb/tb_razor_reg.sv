// tb_razor_reg: random test of the cycle-level Razor register bank.
// Each cycle picks one of the four legal actions (capture, main-only gating,
// hold, restore) and, on captures, sometimes an emulated late arrival. A
// separate model of main and shadow predicts q, sq and the per-bit error.
module tb_razor_reg;
  localparam int unsigned W = 16;
  localparam logic [W-1:0] MASK = 16'h0081;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en_m, en_s, restore, tmg_fault;
  logic [W-1:0] d, q, sq, err;
  logic [W-1:0] m_ref, s_ref;
  int checks = 0, failures = 0, n_err = 0, n_rest = 0;

  razor_reg #(.W(W), .FAULT_MASK(MASK)) dut (.*);

  task automatic check();
    checks++;
    if (q !== m_ref || sq !== s_ref || err !== (m_ref ^ s_ref)) begin
      failures++;
      if (failures < 10) $display("mismatch: q=%h/%h sq=%h/%h err=%h", q, m_ref, sq, s_ref, err);
    end
  endtask

  initial begin
    {en_m, en_s, restore, tmg_fault} = '0;
    d = '0; m_ref = '0; s_ref = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check();
      d = W'($urandom);
      tmg_fault = ($urandom_range(3, 0) == 0);
      case ($urandom_range(3, 0))
        0: {en_m, en_s, restore} = 3'b110;
        1: {en_m, en_s, restore} = 3'b010;
        2: {en_m, en_s, restore} = 3'b000;
        default: {en_m, en_s, restore} = 3'b001;
      endcase
      @(posedge clk);
      if (en_m) m_ref = tmg_fault ? (d ^ MASK) : d;
      else if (restore) begin m_ref = s_ref; n_rest++; end
      if (en_s) s_ref = d;
      if (en_m && tmg_fault) n_err++;
    end
    @(negedge clk);
    check();
    checks++;
    if (n_err == 0 || n_rest == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
