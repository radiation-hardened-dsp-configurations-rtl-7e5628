// tmr_unique_reuse: triple modular redundancy with a unique voter in three
// DSP48E slices, slice 1 doing both its replica of the operation and the
// comparison (dsp_op_cmp, replica 2's result on its C input). Slices 2 and 3
// are plain dsp_op replicas. CLB logic selects
//
//   out = r1 if slice 1 found r1 == r2, else r3.
//
// OP is OP_MUL or OP_MACC. Timing: slice 1 computes in one cycle and
// compares in the next, so operands are accepted at most every second cycle
// and out/out_valid follow in_valid by op_latency(OP) + 1 = 4 cycles.
// Slices 2 and 3 hold their results while slice 1 compares.
// The structure follows the unique-voter scheme with slice reuse; the
// alternating compute/compare schedule is this design's choice.
module tmr_unique_reuse
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
  logic [P_W-1:0] rc [3];
  logic [2:0]     rv;
  logic           eq;

  dsp_op_cmp #(.OP(OP)) u_opc (
    .clk, .rst, .a, .b, .in_valid, .acc_clr,
    .c_other(r[1]), .p(r[0]), .eq, .out_valid(rv[0])
  );
  assign rc[0] = r[0];

  for (genvar k = 1; k < 3; k++) begin : g_rep
    dsp_op #(.OP(OP)) u_op (
      .clk, .rst, .a, .b, .in_valid, .acc_clr,
      .p(r[k]), .pcout(rc[k]), .out_valid(rv[k])
    );
  end

  assign out       = eq ? r[0] : r[2];
  assign out_valid = rv[0];

  logic [P_W-1:0] rc_unused;
  logic [1:0]     rv_unused;
  assign rc_unused = rc[0] ^ rc[1] ^ rc[2];
  assign rv_unused = rv[2:1];

endmodule
