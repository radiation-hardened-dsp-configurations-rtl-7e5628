// hcis_top: the hardened class-instance library, every template side by side
// on shared 16-bit signed operands, one result port pair per template.
//
//   Recommended (six slices, triplicated voter, tmr3_dsp):
//     add_v1, mul_v1, macc_v1
//   Triplicated voter with slice reuse (three slices, tmr3_reuse):
//     mul_v2, macc_v2
//   Unique voter (tmr_unique), comparator in a DSP48E slice / in CLBs:
//     add_v3dsp, add_v3clb, mul_v3dsp, mul_v3clb, macc_v3dsp, macc_v3clb
//   Unique voter with slice reuse (tmr_unique_reuse):
//     mul_v4
//
// A set of operands is taken in a cycle with in_valid and in_ready both
// high; all templates then receive it in the same cycle. in_ready is low in
// the cycle after a taken set, because the reuse templates compute and
// compare in alternate cycles. acc_clr goes with the operands and starts a
// new sum in the multiply-accumulate templates. Each *_out holds the last
// result; *_valid is high for one cycle when a new result appears, 2 to 4
// cycles after the operands (see each template).
// The set of templates follows the library's recommended and alternative
// schemes for add, multiply and multiply-accumulate; the shared operand
// port and the in_ready throttle are this design's choices.
module hcis_top
  import hcis_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              in_valid,
  input  logic              acc_clr,
  output logic              in_ready,
  output logic [P_W-1:0]    add_v1_out,    output logic add_v1_valid,
  output logic [P_W-1:0]    mul_v1_out,    output logic mul_v1_valid,
  output logic [P_W-1:0]    macc_v1_out,   output logic macc_v1_valid,
  output logic [P_W-1:0]    mul_v2_out,    output logic mul_v2_valid,
  output logic [P_W-1:0]    macc_v2_out,   output logic macc_v2_valid,
  output logic [P_W-1:0]    add_v3dsp_out, output logic add_v3dsp_valid,
  output logic [P_W-1:0]    add_v3clb_out, output logic add_v3clb_valid,
  output logic [P_W-1:0]    mul_v3dsp_out, output logic mul_v3dsp_valid,
  output logic [P_W-1:0]    mul_v3clb_out, output logic mul_v3clb_valid,
  output logic [P_W-1:0]    macc_v3dsp_out, output logic macc_v3dsp_valid,
  output logic [P_W-1:0]    macc_v3clb_out, output logic macc_v3clb_valid,
  output logic [P_W-1:0]    mul_v4_out,    output logic mul_v4_valid
);

  logic fire, fired_q;

  assign in_ready = !fired_q;
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst) fired_q <= 1'b0;
    else     fired_q <= fire;
  end

  tmr3_dsp #(.OP(OP_ADD)) u_add_v1 (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(add_v1_out), .out_valid(add_v1_valid));
  tmr3_dsp #(.OP(OP_MUL)) u_mul_v1 (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(mul_v1_out), .out_valid(mul_v1_valid));
  tmr3_dsp #(.OP(OP_MACC)) u_macc_v1 (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(macc_v1_out), .out_valid(macc_v1_valid));

  tmr3_reuse #(.OP(OP_MUL)) u_mul_v2 (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(mul_v2_out), .out_valid(mul_v2_valid));
  tmr3_reuse #(.OP(OP_MACC)) u_macc_v2 (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(macc_v2_out), .out_valid(macc_v2_valid));

  tmr_unique #(.OP(OP_ADD), .CMP_IN_DSP(1'b1)) u_add_v3dsp (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(add_v3dsp_out), .out_valid(add_v3dsp_valid));
  tmr_unique #(.OP(OP_ADD), .CMP_IN_DSP(1'b0)) u_add_v3clb (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(add_v3clb_out), .out_valid(add_v3clb_valid));
  tmr_unique #(.OP(OP_MUL), .CMP_IN_DSP(1'b1)) u_mul_v3dsp (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(mul_v3dsp_out), .out_valid(mul_v3dsp_valid));
  tmr_unique #(.OP(OP_MUL), .CMP_IN_DSP(1'b0)) u_mul_v3clb (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(mul_v3clb_out), .out_valid(mul_v3clb_valid));
  tmr_unique #(.OP(OP_MACC), .CMP_IN_DSP(1'b1)) u_macc_v3dsp (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(macc_v3dsp_out), .out_valid(macc_v3dsp_valid));
  tmr_unique #(.OP(OP_MACC), .CMP_IN_DSP(1'b0)) u_macc_v3clb (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(macc_v3clb_out), .out_valid(macc_v3clb_valid));

  tmr_unique_reuse #(.OP(OP_MUL)) u_mul_v4 (
    .clk, .rst, .a, .b, .in_valid(fire), .acc_clr, .out(mul_v4_out), .out_valid(mul_v4_valid));

endmodule
