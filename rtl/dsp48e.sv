// dsp48e: synthesizable model of the DSP48E slice datapath that the
// hardened templates are built on.
//
// Data flow: A (30 bits) and B (18 bits) pass through 0, 1 or 2 input
// registers; A[24:0] x B[17:0] feeds a signed 25x18 multiplier with an
// optional M register; C (48 bits) has an optional register. Three
// multiplexers X, Y and Z, steered by the 7-bit OPMODE, choose the operands
// of a 48-bit arithmetic/logic unit steered by the 4-bit ALUMODE. Its result
// is stored in the P register, which also drives PCOUT (the cascade to the
// next slice) and feeds back to X and Z. A pattern detector compares the
// unit's result with a pattern (the PATTERN parameter or the C input) under
// a mask and gives PATTERNDETECT (all unmasked bits equal) and
// PATTERNBDETECT (all unmasked bits equal to the complement), registered
// together with P. OPMODE, ALUMODE, CARRYINSEL and CARRYIN may be registered
// (OPMODEREG) so that they change cycle by cycle with the data: the templates
// use this to switch a slice between an operation and a comparison.
// Cascades to the neighbouring slices: A and B may be taken from ACIN/BCIN
// (A_CASCADE, B_CASCADE) and leave on ACOUT/BCOUT after the input registers;
// CARRYCASCOUT is the registered carry of the 48-bit result and
// MULTSIGNOUT the registered sign of the product. The carry input of the
// unit is chosen by CARRYINSEL: 000 CARRYIN, 001 ~PCIN[47], 010 CARRYCASCIN,
// 011 PCIN[47], 100 own CARRYCASCOUT, 101 ~P[47], 110 A[24] xnor B[17]
// (rounding toward the product's sign, aligned with M), 111 P[47]. With
// OPMODE Z = 100 (P for a wide multiply-accumulate) the sign of the lower
// slice's product, MULTSIGNIN, is added as all ones over 48 bits when set.
// USE_SIMD splits the adder into one 48-bit, two 24-bit or four 12-bit
// lanes without carries between them; CARRYOUT[3:0] gives each lane's carry
// (ONE48: bit 3; TWO24: bits 1 and 3; FOUR12: bits 0..3; others 0).
//
// Follows the slice as drawn for the voter and multiplier+voter
// configurations: port widths, the 25x18 multiplier, the M and P registers,
// the 17-bit shifted cascade and feedback inputs of Z and the C-pattern /
// mask detector. The OPMODE and ALUMODE codes are those of the published
// DSP48E primitive. Simplifications of this model: the two multiplier
// partial products are summed inside the multiplier, so OPMODE X=01/Y=01
// pass the whole product once; one synchronous reset (rst) clears every
// register; one clock enable per register group; in the SIMD modes the
// carry input goes to lane 0 only; for the subtract modes the carry is the
// inverted borrow. The meaning of MULTSIGNIN with Z = 100 and the carry-in
// sources are those of the DSP48E primitive, as this model reads them. With
// PREG = 0 the P output and the pattern flags are combinational and the P
// feedback modes must not be used.
module dsp48e
  import hcis_pkg::*;
#(
  parameter int              AREG          = 1,   // 0, 1 or 2
  parameter int              BREG          = 1,   // 0, 1 or 2
  parameter int              CREG          = 1,   // 0 or 1
  parameter int              MREG          = 1,   // 0 or 1
  parameter int              PREG          = 1,   // 0 or 1
  parameter int              OPMODEREG     = 1,   // registers OPMODE, ALUMODE, CARRYIN
  parameter bit              USE_C_PATTERN = 1'b0, // pattern from C instead of PATTERN
  parameter logic [P_W-1:0]  PATTERN       = '0,
  parameter logic [P_W-1:0]  MASK          = '0,  // 1 = bit ignored by the detector
  parameter bit              A_CASCADE     = 1'b0, // A from ACIN instead of A
  parameter bit              B_CASCADE     = 1'b0, // B from BCIN instead of B
  parameter int              USE_SIMD      = 1    // lanes: 1 (ONE48), 2 (TWO24), 4 (FOUR12)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             CEA,
  input  logic             CEB,
  input  logic             CEC,
  input  logic             CEM,
  input  logic             CEP,
  input  logic             CECTRL,
  input  logic [A_W-1:0]   A,
  input  logic [B_W-1:0]   B,
  input  logic [A_W-1:0]   ACIN,
  input  logic [B_W-1:0]   BCIN,
  input  logic [P_W-1:0]   C,
  input  logic [P_W-1:0]   PCIN,
  input  logic [6:0]       OPMODE,
  input  logic [3:0]       ALUMODE,
  input  logic [2:0]       CARRYINSEL,
  input  logic             CARRYIN,
  input  logic             CARRYCASCIN,
  input  logic             MULTSIGNIN,
  output logic [P_W-1:0]   P,
  output logic [P_W-1:0]   PCOUT,
  output logic [A_W-1:0]   ACOUT,
  output logic [B_W-1:0]   BCOUT,
  output logic [3:0]       CARRYOUT,
  output logic             CARRYCASCOUT,
  output logic             MULTSIGNOUT,
  output logic             PATTERNDETECT,
  output logic             PATTERNBDETECT
);

  // ---------------- input registers ----------------
  logic [A_W-1:0] a1_q, a2_q, a_s;
  logic [B_W-1:0] b1_q, b2_q, b_s;
  logic [P_W-1:0] c_q, c_s;
  logic [A_W-1:0] a_in;
  logic [B_W-1:0] b_in;

  assign a_in = A_CASCADE ? ACIN : A;
  assign b_in = B_CASCADE ? BCIN : B;

  always_ff @(posedge clk) begin
    if (rst) begin
      a1_q <= '0; a2_q <= '0; b1_q <= '0; b2_q <= '0; c_q <= '0;
    end else begin
      if (CEA) begin
        a1_q <= a_in;
        a2_q <= (AREG == 2) ? a1_q : a_in;
      end
      if (CEB) begin
        b1_q <= b_in;
        b2_q <= (BREG == 2) ? b1_q : b_in;
      end
      if (CEC) c_q <= C;
    end
  end

  assign a_s   = (AREG == 0) ? a_in : a2_q;
  assign b_s   = (BREG == 0) ? b_in : b2_q;
  assign ACOUT = a_s;
  assign BCOUT = b_s;
  assign c_s = (CREG == 0) ? C : c_q;

  // ---------------- control registers ----------------
  logic [6:0] opm_q, opm_s;
  logic [3:0] alu_q, alu_s;
  logic       cin_q, cin_s;
  logic [2:0] csel_q, csel_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      opm_q <= '0; alu_q <= '0; cin_q <= 1'b0; csel_q <= '0;
    end else if (CECTRL) begin
      opm_q <= OPMODE; alu_q <= ALUMODE; cin_q <= CARRYIN; csel_q <= CARRYINSEL;
    end
  end

  assign opm_s = (OPMODEREG == 0) ? OPMODE  : opm_q;
  assign alu_s = (OPMODEREG == 0) ? ALUMODE : alu_q;
  assign cin_s  = (OPMODEREG == 0) ? CARRYIN    : cin_q;
  assign csel_s = (OPMODEREG == 0) ? CARRYINSEL : csel_q;

  // ---------------- multiplier ----------------
  logic signed [MUL_A_W-1:0]     mul_a;
  logic signed [B_W-1:0]         mul_b;
  logic signed [MUL_A_W+B_W-1:0] prod;
  logic [P_W-1:0]                m_q, m_s;
  logic                          rnd_c, rnd_q, rnd_s;  // A[24] xnor B[17]

  assign mul_a = a_s[MUL_A_W-1:0];
  assign mul_b = b_s;
  assign prod  = mul_a * mul_b;

  assign rnd_c = ~(a_s[MUL_A_W-1] ^ b_s[B_W-1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      m_q <= '0; rnd_q <= 1'b0;
    end else if (CEM) begin
      m_q <= P_W'(prod);               // sign-extended to 48 bits
      rnd_q <= rnd_c;
    end
  end

  assign m_s   = (MREG == 0) ? P_W'(prod) : m_q;
  assign rnd_s = (MREG == 0) ? rnd_c      : rnd_q;

  // ---------------- X / Y / Z multiplexers ----------------
  logic [P_W-1:0] p_q;   // P register, also the feedback source
  logic [P_W-1:0] x_s, y_s, z_s;

  always_comb begin
    unique case (opm_s[1:0])
      X_ZERO:  x_s = '0;
      X_M:     x_s = m_s;
      X_P:     x_s = p_q;
      default: x_s = {a_s, b_s};       // A:B
    endcase
    unique case (opm_s[3:2])
      Y_ZERO:  y_s = '0;
      Y_M:     y_s = '0;               // product already complete in X
      Y_ONES:  y_s = '1;
      Y_C:     y_s = c_s;
      default: y_s = '0;
    endcase
    unique case (opm_s[6:4])
      Z_ZERO:   z_s = '0;
      Z_PCIN:   z_s = PCIN;
      Z_P:      z_s = p_q;
      Z_C:      z_s = c_s;
      Z_PMACC:  z_s = p_q;             // MULTSIGNIN added below
      Z_PCIN17: z_s = P_W'($signed(PCIN) >>> 17);
      Z_P17:    z_s = P_W'($signed(p_q) >>> 17);
      default:  z_s = '0;
    endcase
  end

  // ---------------- carry input ----------------
  logic ccout_q;   // CARRYCASCOUT register
  logic cin_u;

  always_comb begin
    unique case (csel_s)
      3'b000:  cin_u = cin_s;
      3'b001:  cin_u = ~PCIN[P_W-1];
      3'b010:  cin_u = CARRYCASCIN;
      3'b011:  cin_u = PCIN[P_W-1];
      3'b100:  cin_u = ccout_q;
      3'b101:  cin_u = ~p_q[P_W-1];
      3'b110:  cin_u = rnd_s;
      default: cin_u = p_q[P_W-1];
    endcase
  end

  // ---------------- arithmetic / logic unit ----------------
  // Each lane of LW bits is computed on its own; the carry input enters
  // lane 0. In Z = 100 mode a set MULTSIGNIN adds all ones (the sign
  // extension of the lower slice's product) through Y.
  localparam int NL = (USE_SIMD == 4) ? 4 : (USE_SIMD == 2) ? 2 : 1;
  localparam int LW = P_W / NL;

  logic [P_W-1:0] y_e;
  logic [P_W-1:0] alu_out;
  logic [NL-1:0]  lane_co;

  assign y_e = (opm_s[6:4] == Z_PMACC && MULTSIGNIN) ? (y_s | {P_W{1'b1}}) : y_s;

  always_comb begin
    logic [LW:0] sum;
    logic [LW:0] cl;
    for (int l = 0; l < NL; l++) begin
      cl  = (l == 0) ? {{LW{1'b0}}, cin_u} : '0;
      sum = {1'b0, x_s[l*LW +: LW]} + {1'b0, y_e[l*LW +: LW]} + cl;
      lane_co[l] = 1'b0;
      unique case ({2'b00, alu_s[1:0]})
        ALU_ADD: begin                    // Z + X + Y + CIN
          sum = {1'b0, z_s[l*LW +: LW]} + sum;
          alu_out[l*LW +: LW] = sum[LW-1:0];
          lane_co[l] = sum[LW];
        end
        ALU_ZSUB: begin                   // Z - (X + Y + CIN)
          sum = {1'b0, z_s[l*LW +: LW]} - sum;
          alu_out[l*LW +: LW] = sum[LW-1:0];
          lane_co[l] = ~sum[LW];
        end
        ALU_NZADD: begin                  // -Z + (X + Y + CIN) - 1
          sum = sum + {1'b0, ~z_s[l*LW +: LW]};
          alu_out[l*LW +: LW] = sum[LW-1:0];
          lane_co[l] = sum[LW];
        end
        default: begin                    // ALU_NSUM: -Z - X - Y - CIN - 1
          sum = {1'b0, z_s[l*LW +: LW]} + sum;
          alu_out[l*LW +: LW] = ~sum[LW-1:0];
          lane_co[l] = ~sum[LW];
        end
      endcase
    end
    if (alu_s[2]) begin
      lane_co = '0;
      // Logic unit: OPMODE[3] (Y = all ones) inverts the sense of the
      // two-input functions of X and Z.
      unique case ({opm_s[3], alu_s[3], alu_s[1:0]})
        4'b0_0_00, 4'b0_0_11, 4'b1_0_01, 4'b1_0_10: alu_out = x_s ^ z_s;
        4'b0_0_01, 4'b0_0_10, 4'b1_0_00, 4'b1_0_11: alu_out = ~(x_s ^ z_s);
        4'b0_1_00: alu_out = x_s & z_s;
        4'b0_1_01: alu_out = x_s & ~z_s;
        4'b0_1_10: alu_out = ~(x_s & z_s);
        4'b0_1_11: alu_out = ~x_s | z_s;
        4'b1_1_00: alu_out = x_s | z_s;
        4'b1_1_01: alu_out = x_s | ~z_s;
        4'b1_1_10: alu_out = ~(x_s | z_s);
        default:   alu_out = ~x_s & z_s;
      endcase
    end
  end

  // Lane carries onto the four CARRYOUT bits.
  logic [3:0] carry4;
  always_comb begin
    carry4 = '0;
    for (int l = 0; l < NL; l++) carry4[(l + 1) * (4 / NL) - 1] = lane_co[l];
  end

  // ---------------- pattern detector ----------------
  logic [P_W-1:0] pattern_s;
  logic           pd_c, pbd_c;

  assign pattern_s = USE_C_PATTERN ? c_s : PATTERN;
  assign pd_c  = &(~(alu_out ^ pattern_s) | MASK);
  assign pbd_c = &((alu_out ^ pattern_s) | MASK);

  // ---------------- output register ----------------
  logic       pd_q, pbd_q, msign_q;
  logic [3:0] co_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_q <= '0; pd_q <= 1'b0; pbd_q <= 1'b0; co_q <= '0; ccout_q <= 1'b0; msign_q <= 1'b0;
    end else if (CEP) begin
      p_q <= alu_out; pd_q <= pd_c; pbd_q <= pbd_c; co_q <= carry4;
      ccout_q <= carry4[3]; msign_q <= m_s[P_W-1];
    end
  end

  assign P              = (PREG == 0) ? alu_out : p_q;
  assign PCOUT          = P;
  assign CARRYOUT       = (PREG == 0) ? carry4  : co_q;
  assign CARRYCASCOUT   = (PREG == 0) ? carry4[3]    : ccout_q;
  assign MULTSIGNOUT    = (PREG == 0) ? m_s[P_W-1]   : msign_q;
  assign PATTERNDETECT  = (PREG == 0) ? pd_c    : pd_q;
  assign PATTERNBDETECT = (PREG == 0) ? pbd_c   : pbd_q;

  // The two multiplier partial products go to X and Y together.
  a_mul_xy_pair : assert property (@(posedge clk) disable iff (rst)
    (opm_s[1:0] == X_M) == (opm_s[3:2] == Y_M))
    else $error("dsp48e: OPMODE selects M in only one of X and Y");

endmodule
