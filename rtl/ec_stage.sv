// ec_stage: one pipeline stage of the one-cycle error-correction scheme.
//
// It joins the W Razor latches of the stage (razor_reg) to the stage's
// clock-gating control (ec_ctrl): the control turns the latches' per-bit
// error flags and the CG/MCG requests of the neighbouring stages into the
// main/shadow pulse enables and the restore strobe for the next edge, and
// emits the stage's own CG (to output stages) and MCG (to input stages).
// d is the stage input after the stage logic; q is the main latch output.
// act reports what the stage does at the coming edge; captured is high in
// the cycle after the main latch took new data (a capture or a restore).
module ec_stage
  import ec_pkg::*;
#(
  parameter int unsigned  W          = 32,
  parameter int unsigned  NI         = 1,
  parameter int unsigned  NO         = 1,
  parameter logic [W-1:0] FAULT_MASK = W'(1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  d,
  input  logic          tmg_fault,
  input  logic [NO-1:0] mcg_in,
  input  logic [NI-1:0] cg_in,
  output logic [W-1:0]  q,
  output logic          err_any,   // Razor error flagged this cycle
  output logic          mcg_out,
  output logic          cg_out,
  output logic          en_clk_m,
  output logic          en_clk_s,
  output logic          restore,
  output stage_act_e    act,
  output logic          captured,
  output logic          cg_m,
  output logic          cg_ms,
  output logic          nullified
);

  logic [W-1:0] err, sq;
  logic         error_s, gated;

  razor_reg #(.W(W), .FAULT_MASK(FAULT_MASK)) u_reg (
    .clk, .rst_n,
    .en_m(en_clk_m), .en_s(en_clk_s), .restore,
    .tmg_fault, .d, .q, .sq, .err
  );

  ec_ctrl #(.W(W), .NI(NI), .NO(NO)) u_ctrl (
    .clk, .rst_n, .mcg_in, .cg_in, .err,
    .mcg_out, .cg_out, .en_clk_m, .en_clk_s, .restore,
    .error_s, .gated, .cg_m, .cg_ms, .nullified
  );

  assign err_any = |err;

  always_comb begin
    if (en_clk_m)      act = ACT_CAPTURE;
    else if (en_clk_s) act = ACT_GATE_MAIN;
    else if (restore)  act = ACT_RESTORE;
    else               act = ACT_HOLD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) captured <= 1'b0;
    else        captured <= en_clk_m | restore;
  end

endmodule
