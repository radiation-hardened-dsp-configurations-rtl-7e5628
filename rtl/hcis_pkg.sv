// hcis_pkg: types and constants shared by the DSP48E slice model and the
// hardened operation templates built on it.
//
// The slice widths (A 30, B 18, C/P/PCIN 48, a 25x18 multiplier, a 7-bit
// OPMODE and a 4-bit ALUMODE) are those of the DSP48E slice. The OPMODE and
// ALUMODE codes follow the published DSP48E encoding. The templates work on
// 16-bit signed operands, the operand size of the add, multiply and
// multiply-accumulate benchmarks. The latencies below are this design's
// choice of pipeline registers (A/B/C registers, M register, P register).
package hcis_pkg;

  localparam int A_W     = 30;  // A port
  localparam int B_W     = 18;  // B port
  localparam int P_W     = 48;  // C, P, PCIN, PCOUT
  localparam int MUL_A_W = 25;  // multiplier uses A[24:0] x B[17:0]
  localparam int DATA_W  = 16;  // template operand width

  // Operation class implemented by a template.
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,  // P = a + b         (C + A:B)
    OP_MUL  = 2'd1,  // P = a * b         (M)
    OP_MACC = 2'd2   // P = P + a * b     (P + M), or a * b when acc_clr
  } op_e;

  // OPMODE = {Z[2:0], Y[1:0], X[1:0]}
  localparam logic [1:0] X_ZERO = 2'b00, X_M = 2'b01, X_P = 2'b10, X_AB = 2'b11;
  localparam logic [1:0] Y_ZERO = 2'b00, Y_M = 2'b01, Y_ONES = 2'b10, Y_C = 2'b11;
  localparam logic [2:0] Z_ZERO = 3'b000, Z_PCIN = 3'b001, Z_P = 3'b010, Z_C = 3'b011,
                         Z_PMACC = 3'b100, Z_PCIN17 = 3'b101, Z_P17 = 3'b110;

  // ALUMODE codes of the arithmetic unit
  localparam logic [3:0] ALU_ADD    = 4'b0000;  // Z + X + Y + CIN
  localparam logic [3:0] ALU_ZSUB   = 4'b0011;  // Z - (X + Y + CIN)
  localparam logic [3:0] ALU_NZADD  = 4'b0001;  // -Z + (X + Y + CIN) - 1
  localparam logic [3:0] ALU_NSUM   = 4'b0010;  // -Z - X - Y - CIN - 1

  // Common OPMODE settings of the templates
  localparam logic [6:0] OPM_ADD   = {Z_C,    Y_ZERO, X_AB};   // C + A:B
  localparam logic [6:0] OPM_MUL   = {Z_ZERO, Y_M,    X_M};    // M
  localparam logic [6:0] OPM_MACC  = {Z_P,    Y_M,    X_M};    // P + M
  localparam logic [6:0] OPM_HOLD  = {Z_P,    Y_ZERO, X_ZERO}; // P (keep result)
  localparam logic [6:0] OPM_PASS  = {Z_PCIN, Y_ZERO, X_ZERO}; // PCIN

  // Cycles from operands at the template inputs to the new P value.
  // ADD: A/B/C register, P register. MUL/MACC: A/B register, M register,
  // P register.
  function automatic int op_latency(op_e op);
    return (op == OP_ADD) ? 2 : 3;
  endfunction

  // Cycles from the operand registers to the ALU stage (0 for ADD, which
  // bypasses the multiplier, 1 for MUL/MACC through the M register).
  function automatic int ctrl_delay(op_e op);
    return (op == OP_ADD) ? 0 : 1;
  endfunction

  // Sign-extend a template operand to the slice port widths.
  function automatic logic [P_W-1:0] sext48(logic [DATA_W-1:0] v);
    return {{(P_W-DATA_W){v[DATA_W-1]}}, v};
  endfunction

endpackage
