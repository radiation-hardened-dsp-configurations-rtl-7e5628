// tmr_unique: triple modular redundancy with a unique voter. Three DSP48E
// slices compute the operation; replicas 1 and 2 are compared and
//
//   out = r1 if r1 == r2, else r3
//
// so a single wrong replica never reaches out. CMP_IN_DSP selects where the
// comparison is made: 1 (default) in a fourth DSP48E slice (dsp_cmp with
// PREG = 0: r1 on PCIN, r2 on C, pattern detector output used
// combinationally), 0 in CLB logic. The output multiplexer is CLB logic.
// Timing: out/out_valid follow in_valid by op_latency(OP) cycles (2 for
// OP_ADD, 3 otherwise), one result per cycle.
// The structure and the selection rule follow the unique-voter scheme; the
// unregistered comparator is this design's choice, made so that the flag is
// aligned with the replica results without extra registers.
module tmr_unique
  import hcis_pkg::*;
#(
  parameter op_e OP         = OP_MUL,
  parameter bit  CMP_IN_DSP = 1'b1
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

  for (genvar k = 0; k < 3; k++) begin : g_rep
    dsp_op #(.OP(OP)) u_op (
      .clk, .rst, .a, .b, .in_valid, .acc_clr,
      .p(r[k]), .pcout(rc[k]), .out_valid(rv[k])
    );
  end

  if (CMP_IN_DSP) begin : g_cmp_dsp
    logic [P_W-1:0] v_unused;
    dsp_cmp #(.PREG(0)) u_cmp (
      .clk, .rst, .x(rc[0]), .y(r[1]), .p(v_unused), .eq
    );
  end else begin : g_cmp_clb
    assign eq = (r[0] == r[1]);
  end

  assign out       = eq ? r[0] : r[2];
  assign out_valid = rv[0];

  logic [P_W-1:0] rc_unused;
  logic [1:0]     rv_unused;
  assign rc_unused = rc[1] ^ rc[2];
  assign rv_unused = rv[2:1];

endmodule
