// ec_pkg: shared constants, types and topology helpers for the one-cycle
// Razor error-correction pipeline.
//
// A pipeline topology is an adjacency matrix adj_t: adj[k][j] = 1 means the
// Razor register of stage j drives (through stage logic) the register of
// stage k, i.e. j is an input stage of k and k is an output stage of j.
// Stage 0 always takes the primary input. The functions below build the
// topologies used as examples and benchmarks: a linear pipeline, the
// four-stage fan-in/fan-out pipeline with a skip path from A to D, the
// five-stage pipeline with a loop B->C->D->B, and the fan-in/fan-out variants
// of the 5-, 8- and 10-stage linear pipelines (skip paths 2->4, 3->6, 3->8 in
// 1-based stage numbering). The skip-path end points of the last three are
// read from the printed stage numbers and stubs of the benchmark drawings;
// the drawings do not show the wire between the stubs, so the pairing is this
// design's reading.
//
// The pulse widths are the five widths available to the pulse-width
// allocation (130, 170, 210, 250 and 430 ps); 130 ps main and 430 ps shadow
// are the widths used in the experiments.
package ec_pkg;

  // Largest number of stages an adjacency matrix can describe.
  localparam int unsigned MAXN = 16;

  typedef logic [MAXN-1:0][MAXN-1:0] adj_t;

  // Available pulse widths in picoseconds.
  localparam int unsigned PW_PS [5] = '{130, 170, 210, 250, 430};
  localparam int unsigned PW_MAIN_PS   = 130;
  localparam int unsigned PW_SHADOW_PS = 430;

  // Per-edge action of one stage's Razor register, as decided by its
  // control logic in the cycle before the edge.
  typedef enum logic [1:0] {
    ACT_CAPTURE   = 2'd0, // clk_m and clk_s pulse: normal capture
    ACT_GATE_MAIN = 2'd1, // clk_m gated, clk_s pulses: main keeps, shadow captures
    ACT_HOLD      = 2'd2, // both gated: stage stalls
    ACT_RESTORE   = 2'd3  // both gated, restore: main takes the shadow value
  } stage_act_e;

  // Linear pipeline 0 -> 1 -> ... -> n-1.
  function automatic adj_t linear_adj(int unsigned n);
    adj_t a = '0;
    for (int unsigned k = 1; k < n; k++) a[k][k-1] = 1'b1;
    return a;
  endfunction

  // Four stages A..D, linear with an extra path A -> D (fan-out at A,
  // fan-in at D).
  function automatic adj_t fanin_fanout_adj4();
    adj_t a = linear_adj(4);
    a[3][0] = 1'b1;
    return a;
  endfunction

  // Five stages A..E, linear with a loop D -> B (B has fan-in from A and D,
  // D has fan-out to B and E).
  function automatic adj_t loop_adj5();
    adj_t a = linear_adj(5);
    a[1][3] = 1'b1;
    return a;
  endfunction

  // Fan-in/fan-out variant of an n-stage linear pipeline (n = 5, 8 or 10):
  // one skip path from stage src to stage dst (0-based).
  function automatic adj_t skip_adj(int unsigned n, int unsigned src, int unsigned dst);
    adj_t a = linear_adj(n);
    a[dst][src] = 1'b1;
    return a;
  endfunction

  function automatic adj_t fig12_adj(int unsigned n);
    case (n)
      5:       return skip_adj(5, 1, 3);   // 2 -> 4
      8:       return skip_adj(8, 2, 5);   // 3 -> 6
      10:      return skip_adj(10, 2, 7);  // 3 -> 8
      default: return linear_adj(n);
    endcase
  endfunction

endpackage
