// stage_logic: combinational logic between two Razor stages.
//
// The reference pipelines are built from benchmark circuits; the one used for
// the voltage/throughput comparison is a five-stage pipeline of c6288 blocks,
// a 16x16-bit array multiplier with 32 inputs and 32 outputs. This module
// gives each stage that function: the 32-bit stage input is split into two
// 16-bit operands and their 32-bit product is the stage output. A stage with
// several input stages (fan-in) first adds their words modulo 2^32; the
// document does not say how a fan-in stage combines its inputs, the sum is
// this design's choice. The multiplier is written as a plain product and left
// to synthesis. Purely combinational; its delay is what the Razor latches of
// the next stage speculate on.
module stage_logic #(
  parameter int unsigned W  = 32, // even; operands are W/2 bits
  parameter int unsigned NI = 1   // number of input words
) (
  input  logic [NI-1:0][W-1:0] din,
  output logic [W-1:0]         dout
);

  localparam int unsigned H = W / 2;

  logic [W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int unsigned i = 0; i < NI; i++) acc = acc + din[i];
    dout = W'(acc[W-1:H] * acc[H-1:0]);
  end

endmodule
