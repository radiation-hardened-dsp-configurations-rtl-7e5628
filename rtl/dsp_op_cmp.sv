// dsp_op_cmp: one DSP48E slice reused for an arithmetic operation and for the
// comparison of its result with another replica's result (multiplier + voter
// configuration).
//
// The operation path is that of dsp_op (OP_MUL: P = a * b; OP_MACC:
// P = P + a * b, or a * b with acc_clr), latency 3. The other replica's
// result arrives on C, unregistered, and is the pattern of the pattern
// detector, which looks at the arithmetic unit's output. The slice's OPMODE
// is switched cycle by cycle: in the cycle a valid operation reaches the
// arithmetic unit it computes the new result; in every other cycle it holds
// P (P = P), so the detector compares the slice's own result with C. eq is
// therefore valid one cycle after the new result, and out_valid (latency 4)
// marks the cycle in which p and eq belong together. Operations can be
// accepted every second cycle: in_valid must not be high in two
// consecutive cycles (asserted). OP_ADD is not allowed, since an adder
// needs C for an operand.
// Sharing the slice between operation and comparator follows the reuse
// scheme of the TMR templates; doing it by alternating OPMODE (compute, then
// hold and compare) is this design's choice.
module dsp_op_cmp
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
  input  logic [P_W-1:0]    c_other,    // other replica's result
  output logic [P_W-1:0]    p,
  output logic              eq,         // p == c_other, valid with out_valid
  output logic              out_valid
);

  localparam int LAT = op_latency(OP) + 1;

  logic [A_W-1:0] a_port;
  logic [B_W-1:0] b_port;
  assign a_port = A_W'(signed'(a));
  assign b_port = B_W'(signed'(b));

  logic [6:0] opm_in, opm_q;

  always_comb begin
    if (!in_valid)         opm_in = OPM_HOLD;
    else if (OP == OP_MUL) opm_in = OPM_MUL;
    else if (acc_clr)      opm_in = OPM_MUL;
    else                   opm_in = OPM_MACC;
  end

  // One fabric register lines OPMODE up with the M register.
  always_ff @(posedge clk) begin
    if (rst) opm_q <= OPM_HOLD;
    else     opm_q <= opm_in;
  end

  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk) begin
    if (rst) vld_q <= '0;
    else     vld_q <= {vld_q[LAT-2:0], in_valid};
  end
  assign out_valid = vld_q[LAT-1];

  logic [P_W-1:0] pcout_unused;
  logic           pbd_unused;
  logic [3:0]     co_unused;
  logic [A_W-1:0] acout_unused;
  logic [B_W-1:0] bcout_unused;
  logic           ccout_unused, msign_unused;

  dsp48e #(
    .AREG(1), .BREG(1), .CREG(0), .MREG(1), .PREG(1), .OPMODEREG(1),
    .USE_C_PATTERN(1'b1), .MASK('0)
  ) u_dsp (
    .clk, .rst,
    .CEA(1'b1), .CEB(1'b1), .CEC(1'b0), .CEM(1'b1), .CEP(1'b1), .CECTRL(1'b1),
    .A(a_port), .B(b_port), .ACIN('0), .BCIN('0), .C(c_other), .PCIN('0),
    .OPMODE(opm_q), .ALUMODE(ALU_ADD), .CARRYINSEL(3'b000), .CARRYIN(1'b0), .CARRYCASCIN(1'b0), .MULTSIGNIN(1'b0),
    .P(p), .PCOUT(pcout_unused), .ACOUT(acout_unused), .BCOUT(bcout_unused), .CARRYOUT(co_unused),
    .CARRYCASCOUT(ccout_unused), .MULTSIGNOUT(msign_unused),
    .PATTERNDETECT(eq), .PATTERNBDETECT(pbd_unused)
  );

  initial begin
    if (OP == OP_ADD) $error("dsp_op_cmp: OP_ADD needs C for an operand");
  end

  a_half_rate : assert property (@(posedge clk) disable iff (rst)
    in_valid |=> !in_valid)
    else $error("dsp_op_cmp: operands accepted in two consecutive cycles");

endmodule
