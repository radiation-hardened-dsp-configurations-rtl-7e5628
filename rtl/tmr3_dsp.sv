// tmr3_dsp: triple modular redundancy with a triplicated voter, operations and
// comparators in separate DSP48E slices (six slices), followed by CLB logic.
// This is the template the library recommends.
//
// Three dsp_op replicas compute the same operation on a and b. Comparator
// slice k takes replica k's result on its PCIN cascade and the next
// replica's result on C:  cmp1: r1 vs r2 -> eq12,  cmp2: r2 vs r3 -> eq23,
// cmp3: r3 vs r1 -> eq13. The comparators pass their PCIN value on to P, so
// the CLB merge (tmr_merge) receives the results of replicas 1 and 2 from
// comparators 1 and 2 together with the three flags. A single wrong replica
// or a single wrong flag is outvoted.
// Timing: result on out with out_valid op_latency(OP) + 1 cycles after
// in_valid (3 for OP_ADD, 4 for OP_MUL and OP_MACC), one result per cycle.
// out holds its value between results.
// The six-slice structure and the ring of comparisons follow the
// triplicated-voter scheme; the pairing of replicas on PCIN and C and the
// merge rule are this design's choices.
module tmr3_dsp
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

  logic [P_W-1:0] r   [3];   // replica results (P)
  logic [P_W-1:0] rc  [3];   // replica results on the PCOUT cascade
  logic [P_W-1:0] v   [3];   // comparator pass-through results
  logic           eq  [3];   // eq[0] = eq12, eq[1] = eq23, eq[2] = eq13
  logic [2:0]     rv;

  for (genvar k = 0; k < 3; k++) begin : g_rep
    dsp_op #(.OP(OP)) u_op (
      .clk, .rst, .a, .b, .in_valid, .acc_clr,
      .p(r[k]), .pcout(rc[k]), .out_valid(rv[k])
    );
    dsp_cmp #(.PREG(1)) u_cmp (
      .clk, .rst, .x(rc[k]), .y(r[(k + 1) % 3]), .p(v[k]), .eq(eq[k])
    );
  end

  tmr_merge #(.W(P_W)) u_merge (
    .v1(v[0]), .v2(v[1]), .eq12(eq[0]), .eq23(eq[1]), .eq13(eq[2]), .out
  );

  logic [P_W-1:0] v3_unused;
  logic [1:0]     rv_unused;
  assign v3_unused = v[2];
  assign rv_unused = rv[2:1];

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= rv[0];
  end

endmodule
