// dsp_cmp: comparator DSP(=), one DSP48E slice used as the comparison
// stage of a voter.
//
// The replica result x enters on the PCIN cascade and is passed through the
// arithmetic unit unchanged (OPMODE Z = PCIN, X = Y = 0). The other replica
// result y enters on C, unregistered, and is the pattern of the pattern
// detector with an empty mask, so PATTERNDETECT says x == y over all 48 bits.
// With PREG = 1 (default) p = x and eq = (x == y) appear one cycle after x
// and y; with PREG = 0 both are combinational.
// The use of the pattern detector with C as pattern and PCIN as the data
// path follows the voter configuration of the slice; the register settings
// are this design's choice.
module dsp_cmp
  import hcis_pkg::*;
#(
  parameter int PREG = 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [P_W-1:0] x,     // on PCIN, passed to p
  input  logic [P_W-1:0] y,     // on C, the pattern
  output logic [P_W-1:0] p,
  output logic           eq
);

  logic [P_W-1:0] pcout_unused;
  logic           pbd_unused;
  logic [3:0]     co_unused;
  logic [A_W-1:0] acout_unused;
  logic [B_W-1:0] bcout_unused;
  logic           ccout_unused, msign_unused;

  dsp48e #(
    .AREG(0), .BREG(0), .CREG(0), .MREG(0), .PREG(PREG), .OPMODEREG(0),
    .USE_C_PATTERN(1'b1), .MASK('0)
  ) u_dsp (
    .clk, .rst,
    .CEA(1'b0), .CEB(1'b0), .CEC(1'b0), .CEM(1'b0), .CEP(1'b1), .CECTRL(1'b0),
    .A('0), .B('0), .ACIN('0), .BCIN('0), .C(y), .PCIN(x),
    .OPMODE(OPM_PASS), .ALUMODE(ALU_ADD), .CARRYINSEL(3'b000), .CARRYIN(1'b0), .CARRYCASCIN(1'b0), .MULTSIGNIN(1'b0),
    .P(p), .PCOUT(pcout_unused), .ACOUT(acout_unused), .BCOUT(bcout_unused), .CARRYOUT(co_unused),
    .CARRYCASCOUT(ccout_unused), .MULTSIGNOUT(msign_unused),
    .PATTERNDETECT(eq), .PATTERNBDETECT(pbd_unused)
  );

endmodule
