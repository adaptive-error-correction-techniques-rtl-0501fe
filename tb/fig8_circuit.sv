// fig8_circuit: four latch-level Razor latches a, b, c, d with timed
// combinational paths, used to study pulse widths and time borrowing.
//
// Latches a and b launch data into one block feeding latch c; latch c feeds
// latch d. The path delays are a -> c 2.0 ns (0.9 + 1.1), b -> c 1.8 ns
// (0.7 + 1.1) and c -> d 1.7 ns, all longer than the 1.5 ns clock period.
// Setup, clock-to-Q and data-to-Q delays are zero. The logic function is
// c = a ^ b and d = c, only so that each path can be exercised alone.
// Each path is modelled as a delay 1 ps shorter than its nominal
// value, so that data arriving exactly as a pulse closes counts as on time
// (zero setup time) instead of racing the pulse edge in simulation.
//
// Parameters are the main-pulse widths of a/b, c and d and the common
// shadow-pulse width, in ps. restore is tied low: this circuit only shows
// which latch flags an error and whether its shadow holds the right value.
module fig8_circuit #(
  parameter int unsigned WM_AB = 100,
  parameter int unsigned WM_C  = 300,
  parameter int unsigned WM_D  = 200,
  parameter int unsigned WS    = 600,
  parameter int unsigned D_AC  = 2000,
  parameter int unsigned D_BC  = 1800,
  parameter int unsigned D_CD  = 1700
) (
  input  logic clk,
  input  logic da,
  input  logic db,
  output logic qc,
  output logic sc,      // shadow value of c (true polarity)
  output logic err_c,
  output logic qd,
  output logic sd,      // shadow value of d (true polarity)
  output logic err_d
);
  timeunit 1ps;
  timeprecision 1ps;

  logic pm_ab, pm_c, pm_d, ps;
  logic qa, qb, pa, pb, dc, dd;
  logic sqn_a, sqn_b, sqn_c, sqn_d, err_a, err_b;

  pulse_gen #(.WIDTH_PS(WM_AB)) u_pm_ab (.clk, .en(1'b1), .pulse(pm_ab));
  pulse_gen #(.WIDTH_PS(WM_C))  u_pm_c  (.clk, .en(1'b1), .pulse(pm_c));
  pulse_gen #(.WIDTH_PS(WM_D))  u_pm_d  (.clk, .en(1'b1), .pulse(pm_d));
  pulse_gen #(.WIDTH_PS(WS))    u_ps    (.clk, .en(1'b1), .pulse(ps));

  razor_latch u_a (.D(da), .clk_m(pm_ab), .clk_s(ps), .restore(1'b0), .Q(qa), .SQN(sqn_a), .error(err_a));
  razor_latch u_b (.D(db), .clk_m(pm_ab), .clk_s(ps), .restore(1'b0), .Q(qb), .SQN(sqn_b), .error(err_b));
  razor_latch u_c (.D(dc), .clk_m(pm_c),  .clk_s(ps), .restore(1'b0), .Q(qc), .SQN(sqn_c), .error(err_c));
  razor_latch u_d (.D(dd), .clk_m(pm_d),  .clk_s(ps), .restore(1'b0), .Q(qd), .SQN(sqn_d), .error(err_d));

  assign #(D_AC - 1) pa = qa;
  assign #(D_BC - 1) pb = qb;
  assign #(D_CD - 1) dd = qc;
  assign dc = pa ^ pb;

  assign sc = ~sqn_c;
  assign sd = ~sqn_d;
endmodule
