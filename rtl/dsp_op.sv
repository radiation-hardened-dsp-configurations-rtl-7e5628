// dsp_op: one operation class instance, DSP(O): a single DSP48E slice set up
// as a 16-bit signed adder, multiplier or multiply-accumulator.
//
// OP_ADD : a goes to C, b (sign-extended to 48 bits) to A:B; P = C + A:B.
//          Latency 2 (C or A/B register, P register).
// OP_MUL : a goes to A, b to B; P = M = a * b. Latency 3 (A/B, M, P).
// OP_MACC: as OP_MUL with the Z multiplexer on P; P = P + a * b, or a * b
//          when acc_clr is high with the operands. Latency 3.
// The OPMODE is chosen cycle by cycle: an operation when in_valid
// accompanied the operands now reaching the arithmetic unit, otherwise a
// hold (P = P), so P keeps the last result until the next valid operands.
// OPMODE is registered in the slice with the operands; for MUL and MACC one
// more fabric register lines it up with the M register. out_valid is high in
// the first cycle a new result is on p. pcout is the slice's P cascade output.
// The operation classes and their 16-bit size follow the benchmarks; the
// port mapping, signed operands, the hold OPMODE and the valid signalling
// are this design's choices.
module dsp_op
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
  output logic [P_W-1:0]    p,
  output logic [P_W-1:0]    pcout,
  output logic              out_valid
);

  localparam int LAT  = op_latency(OP);
  localparam int CDLY = ctrl_delay(OP);

  logic [P_W-1:0] a48, b48;
  logic [A_W-1:0] a_port;
  logic [B_W-1:0] b_port;
  logic [P_W-1:0] c_port;

  assign a48 = sext48(a);
  assign b48 = sext48(b);

  always_comb begin
    if (OP == OP_ADD) begin
      {a_port, b_port} = b48;     // A:B carries b
      c_port           = a48;     // C carries a
    end else begin
      a_port = a48[A_W-1:0];
      b_port = b48[B_W-1:0];
      c_port = '0;
    end
  end

  // Operation select for the slice, delayed to the ALU stage.
  logic [6:0] opm_in, opm_dly;

  always_comb begin
    if (!in_valid)           opm_in = OPM_HOLD;
    else if (OP == OP_ADD)   opm_in = OPM_ADD;
    else if (OP == OP_MUL)   opm_in = OPM_MUL;
    else if (acc_clr)        opm_in = OPM_MUL;
    else                     opm_in = OPM_MACC;
  end

  generate
    if (CDLY == 0) begin : g_ctrl_direct
      assign opm_dly = opm_in;
    end else begin : g_ctrl_reg
      logic [6:0] opm_q;
      always_ff @(posedge clk) begin
        if (rst) opm_q <= OPM_HOLD;
        else     opm_q <= opm_in;
      end
      assign opm_dly = opm_q;
    end
  endgenerate

  // Valid pipeline, LAT stages.
  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk) begin
    if (rst) vld_q <= '0;
    else     vld_q <= {vld_q[LAT-2:0], in_valid};
  end
  assign out_valid = vld_q[LAT-1];

  logic [3:0]     co_unused;
  logic [A_W-1:0] acout_unused;
  logic [B_W-1:0] bcout_unused;
  logic           ccout_unused, msign_unused, pd_unused, pbd_unused;

  dsp48e #(
    .AREG(1), .BREG(1), .CREG(1), .MREG(1), .PREG(1), .OPMODEREG(1)
  ) u_dsp (
    .clk, .rst,
    .CEA(1'b1), .CEB(1'b1), .CEC(1'b1), .CEM(1'b1), .CEP(1'b1), .CECTRL(1'b1),
    .A(a_port), .B(b_port), .ACIN('0), .BCIN('0), .C(c_port), .PCIN('0),
    .OPMODE(opm_dly), .ALUMODE(ALU_ADD), .CARRYINSEL(3'b000), .CARRYIN(1'b0), .CARRYCASCIN(1'b0), .MULTSIGNIN(1'b0),
    .P(p), .PCOUT(pcout), .ACOUT(acout_unused), .BCOUT(bcout_unused), .CARRYOUT(co_unused),
    .CARRYCASCOUT(ccout_unused), .MULTSIGNOUT(msign_unused),
    .PATTERNDETECT(pd_unused), .PATTERNBDETECT(pbd_unused)
  );

endmodule
