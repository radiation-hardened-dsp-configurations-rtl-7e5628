// tmr3_reuse: triple modular redundancy with a triplicated voter in three
// DSP48E slices, each slice doing both one replica of the operation and one
// comparison (dsp_op_cmp), followed by CLB logic.
//
// Slice 1 compares its result with replica 2 (eq12), slice 2 with replica 3
// (eq23), slice 3 with replica 1 (eq13): each slice's C input is fed from the
// P output of the next slice in the ring. tmr_merge picks the output from
// replicas 1 and 2 and the three flags, so a single wrong replica or flag is
// outvoted. OP is OP_MUL or OP_MACC.
// Timing: a slice computes in one cycle and compares in the next, so
// operands are accepted at most every second cycle (in_valid never high two
// cycles running) and out/out_valid follow in_valid by op_latency(OP) + 1 =
// 4 cycles. out holds its value between results.
// The three-slice ring follows the reuse scheme; the alternating
// compute/compare schedule is this design's choice.
module tmr3_reuse
  import hcis_pkg::*;
#(
  parameter op_e OP = OP_MUL
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              in_valid,
  input  logic              acc_clr,
  output logic [P_W-1:0]    out,
  output logic              out_valid
);

  logic [P_W-1:0] r  [3];
  logic           eq [3];   // eq12, eq23, eq13
  logic [2:0]     rv;

  for (genvar k = 0; k < 3; k++) begin : g_rep
    dsp_op_cmp #(.OP(OP)) u_opc (
      .clk, .rst, .a, .b, .in_valid, .acc_clr,
      .c_other(r[(k + 1) % 3]), .p(r[k]), .eq(eq[k]), .out_valid(rv[k])
    );
  end

  tmr_merge #(.W(P_W)) u_merge (
    .v1(r[0]), .v2(r[1]), .eq12(eq[0]), .eq23(eq[1]), .eq13(eq[2]), .out
  );

  logic [1:0] rv_unused;
  assign rv_unused = rv[2:1];
  assign out_valid = rv[0];

endmodule
