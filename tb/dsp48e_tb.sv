// dsp48e_tb: self-checking test of the DSP48E slice model.
//
// Instance u_a (A/B/C/OPMODE registers, no M register, P register, pattern
// from C with the low 8 bits masked) gets a random stream of operations: a
// new OPMODE/ALUMODE every cycle drawn from multiply, multiply-accumulate,
// add, the three subtract forms, the PCIN and P feedback paths (also shifted
// by 17) and the logic functions. A reference model written with plain
// integer arithmetic tracks the expected P, CARRYOUT (add mode) and the two
// pattern flags, checked every cycle (latency 2).
// Instance u_m (two A/B registers, M register, P register) checks the
// multiplier latency: a product appears exactly 4 cycles after its operands,
// and that ACOUT/BCOUT carry A and B 2 cycles late.
// Instance u_c takes A and B from the ACIN/BCIN cascade and gets a random
// CARRYINSEL each cycle (all eight carry sources, including its own
// CARRYCASCOUT, the P and PCIN signs and the rounding bit A[24] xnor B[17])
// with C + A:B, the product, or P + A:B in the wide multiply-accumulate mode
// where MULTSIGNIN adds all ones; P, CARRYOUT, CARRYCASCOUT, MULTSIGNOUT and
// ACOUT/BCOUT are checked.
// Instances u_s4 (four 12-bit lanes) and u_s2 (two 24-bit lanes) compute
// C + A:B with a random arithmetic ALUMODE; every lane and its carry bit is
// checked against lane-wise integer arithmetic, so a carry crossing a lane
// boundary is caught.
module dsp48e_tb;
  import hcis_pkg::*;

  localparam int NCYC = 3000;
  localparam logic [P_W-1:0] TB_MASK = 48'h0000_0000_00FF;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- random-operation instance ----------------
  logic [A_W-1:0] A;
  logic [B_W-1:0] B;
  logic [P_W-1:0] C, PCIN;
  logic [6:0]     OPMODE;
  logic [3:0]     ALUMODE;
  logic           CARRYIN;
  logic [P_W-1:0] P, PCOUT;
  logic           CARRYOUT, PD, PBD;
  logic [3:0]     CO4;
  logic [A_W-1:0] acout_a;
  logic [B_W-1:0] bcout_a;
  logic           ccout_a, msign_a;
  assign CARRYOUT = CO4[3];

  dsp48e #(
    .AREG(1), .BREG(1), .CREG(1), .MREG(0), .PREG(1), .OPMODEREG(1),
    .USE_C_PATTERN(1'b1), .MASK(TB_MASK)
  ) u_a (
    .clk, .rst, .CEA(1'b1), .CEB(1'b1), .CEC(1'b1), .CEM(1'b1), .CEP(1'b1), .CECTRL(1'b1),
    .A, .B, .ACIN('0), .BCIN('0), .C, .PCIN, .OPMODE, .ALUMODE,
    .CARRYINSEL(3'b000), .CARRYIN, .CARRYCASCIN(1'b0), .MULTSIGNIN(1'b0),
    .P, .PCOUT, .ACOUT(acout_a), .BCOUT(bcout_a), .CARRYOUT(CO4),
    .CARRYCASCOUT(ccout_a), .MULTSIGNOUT(msign_a),
    .PATTERNDETECT(PD), .PATTERNBDETECT(PBD)
  );

  // ---------------- latency instance ----------------
  logic [A_W-1:0] A2;
  logic [B_W-1:0] B2;
  logic [P_W-1:0] P2, P2C;
  logic [3:0]     co2;
  logic           pd2, pbd2, ccout2, msign2;
  logic [A_W-1:0] acout2;
  logic [B_W-1:0] bcout2;

  dsp48e #(
    .AREG(2), .BREG(2), .CREG(1), .MREG(1), .PREG(1), .OPMODEREG(0)
  ) u_m (
    .clk, .rst, .CEA(1'b1), .CEB(1'b1), .CEC(1'b1), .CEM(1'b1), .CEP(1'b1), .CECTRL(1'b1),
    .A(A2), .B(B2), .ACIN('0), .BCIN('0), .C('0), .PCIN('0), .OPMODE(OPM_MUL), .ALUMODE(ALU_ADD),
    .CARRYINSEL(3'b000), .CARRYIN(1'b0), .CARRYCASCIN(1'b0), .MULTSIGNIN(1'b0),
    .P(P2), .PCOUT(P2C), .ACOUT(acout2), .BCOUT(bcout2), .CARRYOUT(co2),
    .CARRYCASCOUT(ccout2), .MULTSIGNOUT(msign2), .PATTERNDETECT(pd2), .PATTERNBDETECT(pbd2)
  );

  // ---------------- carry-select / cascade instance ----------------
  logic [A_W-1:0] ACIN3, acout3;
  logic [B_W-1:0] BCIN3, bcout3;
  logic [6:0]     opm3;
  logic [2:0]     csel3;
  logic           cin3, ccin3, msin3;
  logic [P_W-1:0] P3, P3C;
  logic [3:0]     co3;
  logic           ccout3, msign3, pd3, pbd3;

  dsp48e #(
    .AREG(1), .BREG(1), .CREG(1), .MREG(0), .PREG(1), .OPMODEREG(1),
    .A_CASCADE(1'b1), .B_CASCADE(1'b1)
  ) u_c (
    .clk, .rst, .CEA(1'b1), .CEB(1'b1), .CEC(1'b1), .CEM(1'b1), .CEP(1'b1), .CECTRL(1'b1),
    .A, .B, .ACIN(ACIN3), .BCIN(BCIN3), .C, .PCIN, .OPMODE(opm3), .ALUMODE(ALU_ADD),
    .CARRYINSEL(csel3), .CARRYIN(cin3), .CARRYCASCIN(ccin3), .MULTSIGNIN(msin3),
    .P(P3), .PCOUT(P3C), .ACOUT(acout3), .BCOUT(bcout3), .CARRYOUT(co3),
    .CARRYCASCOUT(ccout3), .MULTSIGNOUT(msign3), .PATTERNDETECT(pd3), .PATTERNBDETECT(pbd3)
  );

  // ---------------- SIMD instances ----------------
  logic [3:0]     alu_s;
  logic [P_W-1:0] P4, P4C, P5, P5C;
  logic [3:0]     co4s, co5s;
  logic [A_W-1:0] acout4, acout5;
  logic [B_W-1:0] bcout4, bcout5;
  logic           ccout4, ccout5, msign4, msign5, pd4, pbd4, pd5, pbd5;

  dsp48e #(
    .AREG(1), .BREG(1), .CREG(1), .MREG(0), .PREG(1), .OPMODEREG(1), .USE_SIMD(4)
  ) u_s4 (
    .clk, .rst, .CEA(1'b1), .CEB(1'b1), .CEC(1'b1), .CEM(1'b1), .CEP(1'b1), .CECTRL(1'b1),
    .A, .B, .ACIN('0), .BCIN('0), .C, .PCIN('0), .OPMODE(OPM_ADD), .ALUMODE(alu_s),
    .CARRYINSEL(3'b000), .CARRYIN, .CARRYCASCIN(1'b0), .MULTSIGNIN(1'b0),
    .P(P4), .PCOUT(P4C), .ACOUT(acout4), .BCOUT(bcout4), .CARRYOUT(co4s),
    .CARRYCASCOUT(ccout4), .MULTSIGNOUT(msign4), .PATTERNDETECT(pd4), .PATTERNBDETECT(pbd4)
  );

  dsp48e #(
    .AREG(1), .BREG(1), .CREG(1), .MREG(0), .PREG(1), .OPMODEREG(1), .USE_SIMD(2)
  ) u_s2 (
    .clk, .rst, .CEA(1'b1), .CEB(1'b1), .CEC(1'b1), .CEM(1'b1), .CEP(1'b1), .CECTRL(1'b1),
    .A, .B, .ACIN('0), .BCIN('0), .C, .PCIN('0), .OPMODE(OPM_ADD), .ALUMODE(alu_s),
    .CARRYINSEL(3'b000), .CARRYIN, .CARRYCASCIN(1'b0), .MULTSIGNIN(1'b0),
    .P(P5), .PCOUT(P5C), .ACOUT(acout5), .BCOUT(bcout5), .CARRYOUT(co5s),
    .CARRYCASCOUT(ccout5), .MULTSIGNOUT(msign5), .PATTERNDETECT(pd5), .PATTERNBDETECT(pbd5)
  );

  // Lane-wise reference of C + A:B for nl lanes: result and CARRYOUT bits.
  task automatic simd_ref(input logic [P_W-1:0] ab, input logic [P_W-1:0] c,
                          input logic [3:0] alum, input logic cin, input int nl,
                          output logic [P_W-1:0] res, output logic [3:0] co4);
    int lw;
    longint unsigned x, z, m, r, cl;
    logic c_l;
    lw  = P_W / nl;
    m   = (64'd1 << lw) - 1;
    co4 = '0;
    res = '0;
    for (int l = 0; l < nl; l++) begin
      x  = (ab >> (l * lw)) & m;
      z  = (c >> (l * lw)) & m;
      cl = (l == 0) ? longint'(cin) : 0;
      case (alum)
        4'b0000: begin r = z + x + cl;            c_l = r[lw];  end
        4'b0011: begin r = z - (x + cl);          c_l = !r[63]; end
        4'b0001: begin r = x + cl + (~z & m);     c_l = r[lw];  end
        default: begin r = z + x + cl;            c_l = !r[lw]; r = ~r; end
      endcase
      res = res | (P_W'(r & m) << (l * lw));
      co4[(l + 1) * (4 / nl) - 1] = c_l;
    end
  endtask

  // Operation table: {OPMODE, ALUMODE}
  localparam int NOPS = 18;
  logic [10:0] ops [NOPS] = '{
    {7'b000_01_01, 4'b0000},  // M
    {7'b010_01_01, 4'b0000},  // P + M
    {7'b011_00_11, 4'b0000},  // C + A:B
    {7'b011_00_11, 4'b0011},  // C - A:B
    {7'b011_00_11, 4'b0001},  // -C + A:B - 1
    {7'b011_00_11, 4'b0010},  // -C - A:B - 1
    {7'b001_00_11, 4'b0000},  // PCIN + A:B
    {7'b101_00_11, 4'b0000},  // (PCIN >>> 17) + A:B
    {7'b110_00_10, 4'b0000},  // (P >>> 17) + P
    {7'b000_11_10, 4'b0000},  // C + P
    {7'b010_10_00, 4'b0000},  // P + all ones
    {7'b011_00_11, 4'b0100},  // A:B xor C
    {7'b011_00_11, 4'b0101},  // A:B xnor C
    {7'b011_00_11, 4'b1100},  // A:B and C
    {7'b011_10_11, 4'b1100},  // A:B or C
    {7'b011_00_11, 4'b1101},  // A:B and not C
    {7'b011_10_11, 4'b1110},  // A:B nor C
    {7'b011_10_11, 4'b1111}   // not A:B and C
  };

  // Reference state
  logic [P_W-1:0] ref_p;
  logic           ref_co, ref_pd, ref_pbd;
  logic           ref_ok;                // reference valid (after reset)
  logic           ref_cochk;             // carry is checked for this result
  logic [6:0]     m_opm;                 // operation of the expected result
  logic [3:0]     m_alu;

  function automatic logic [P_W-1:0] sx(logic [P_W-1:0] v, int sh);
    return P_W'($signed(v) >>> sh);
  endfunction

  task automatic model(input logic [A_W-1:0] a, input logic [B_W-1:0] b,
                       input logic [P_W-1:0] c, input logic [P_W-1:0] pcin,
                       input logic [6:0] opm, input logic [3:0] alum, input logic cin);
    longint unsigned x, y, z, r, mask48;
    logic [P_W-1:0]  res, ab, prod;
    logic            co;
    mask48 = (64'd1 << 48) - 1;
    ab   = {a, b};
    prod = P_W'(longint'($signed(a[24:0])) * longint'($signed(b)));
    co   = 1'b0;
    case (opm[1:0]) 2'd0: x = 0; 2'd1: x = prod; 2'd2: x = ref_p; default: x = ab; endcase
    case (opm[3:2]) 2'd0: y = 0; 2'd1: y = 0; 2'd2: y = mask48; default: y = c; endcase
    case (opm[6:4])
      3'd0: z = 0; 3'd1: z = pcin; 3'd2: z = ref_p; 3'd3: z = c; 3'd4: z = ref_p;
      3'd5: z = sx(pcin, 17); 3'd6: z = sx(ref_p, 17); default: z = 0;
    endcase
    case (alum)
      4'b0000: begin r = z + x + y + cin; res = r[47:0]; co = r[48]; end
      4'b0011: begin r = z - (x + y + cin); res = r[47:0]; end
      4'b0001: begin r = (x + y + cin) - z - 1; res = r[47:0]; end
      4'b0010: begin r = 0 - z - x - y - cin - 1; res = r[47:0]; end
      4'b0100: res = opm[3] ? ~(x ^ z) : (x ^ z);
      4'b0101: res = opm[3] ? (x ^ z) : ~(x ^ z);
      4'b1100: res = opm[3] ? (x | z) : (x & z);
      4'b1101: res = opm[3] ? (x | ~z) : (x & ~z);
      4'b1110: res = opm[3] ? ~(x | z) : ~(x & z);
      default: res = opm[3] ? (~x & z) : (~x | z);
    endcase
    ref_pd  = ((res ~^ c) | TB_MASK) == '1;
    ref_pbd = ((res ^ c) | TB_MASK) == '1;
    ref_co    = co;
    ref_cochk = (alum == 4'b0000) && (opm[3:2] == 2'b00);  // two-operand add
    ref_p   = res;
    m_opm   = opm;
    m_alu   = alum;
  endtask

  // Carry-select instance reference
  logic [P_W-1:0] ref3_p;
  logic           ref3_co, ref3_ms;
  logic [A_W-1:0] s3_acin;  logic [B_W-1:0] s3_bcin;
  logic [P_W-1:0] s3_c;     logic [6:0] s3_opm; logic [2:0] s3_csel; logic s3_cin;
  int             csel_count [8];
  int             ms_hits = 0;

  task automatic model3(input logic [P_W-1:0] pcin, input logic ccin, input logic msin);
    longint unsigned mask48, x, y, z, s1, s2;
    logic [P_W-1:0] prod;
    logic           cin, rnd;
    mask48 = (64'd1 << 48) - 1;
    prod = P_W'(longint'($signed(s3_acin[24:0])) * longint'($signed(s3_bcin)));
    rnd  = ~(s3_acin[24] ^ s3_bcin[17]);
    case (s3_csel)
      3'd0: cin = s3_cin;       3'd1: cin = ~pcin[47];   3'd2: cin = ccin;
      3'd3: cin = pcin[47];     3'd4: cin = ref3_co;     3'd5: cin = ~ref3_p[47];
      3'd6: cin = rnd;          default: cin = ref3_p[47];
    endcase
    y = 0;
    if (s3_opm == OPM_ADD)      begin x = {s3_acin, s3_bcin}; z = s3_c; end
    else if (s3_opm == OPM_MUL) begin x = prod; z = 0; end
    else                        begin x = {s3_acin, s3_bcin}; z = ref3_p; if (msin) y = mask48; end
    s1 = (x + y + longint'(cin)) & ((64'd1 << 49) - 1);
    s2 = (z + s1) & ((64'd1 << 49) - 1);
    ref3_p  = P_W'(s2 & mask48);
    ref3_co = s2[48];
    ref3_ms = prod[47];
  endtask

  // SIMD references
  logic [P_W-1:0] ref4_p, ref5_p;
  logic [3:0]     ref4_co, ref5_co;
  logic [3:0]     s_alus;
  int             lane_carries = 0;

  // Latency instance reference: products by issue cycle
  logic [P_W-1:0] lat_exp [NCYC + 8];
  logic [A_W-1:0] a2_hist [NCYC + 8];
  logic [B_W-1:0] b2_hist [NCYC + 8];
  int             lat_seen = 0;

  // Inputs registered by the slice this cycle (stage 1)
  logic [A_W-1:0] s_a; logic [B_W-1:0] s_b; logic [P_W-1:0] s_c;
  logic [6:0] s_opm; logic [3:0] s_alu; logic s_cin;

  int op_count [NOPS];

  initial begin
    int k, cyc;
    logic [P_W-1:0] r48;
    A = '0; B = '0; C = '0; PCIN = '0; OPMODE = '0; ALUMODE = '0; CARRYIN = 1'b0;
    A2 = '0; B2 = '0;
    ACIN3 = '0; BCIN3 = '0; opm3 = '0; csel3 = '0; cin3 = 1'b0; ccin3 = 1'b0; msin3 = 1'b0; alu_s = '0;
    ref3_p = '0; ref3_co = 1'b0; ref3_ms = 1'b0; ref4_p = '0; ref5_p = '0; ref4_co = '0; ref5_co = '0;
    s3_acin = '0; s3_bcin = '0; s3_c = '0; s3_opm = '0; s3_csel = '0; s3_cin = 1'b0; s_alus = '0;
    foreach (csel_count[i]) csel_count[i] = 0;
    ref_p = '0; ref_ok = 1'b0; ref_cochk = 1'b0; ref_co = 1'b0; ref_pd = 1'b0; ref_pbd = 1'b0;
    s_a = '0; s_b = '0; s_c = '0; s_opm = '0; s_alu = '0; s_cin = 1'b0;
    foreach (op_count[i]) op_count[i] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      // ---- check what the last rising edge produced ----
      if (ref_ok) begin
        checks++;
        if (P !== ref_p || PCOUT !== ref_p) begin
          failures++;
          if (failures < 10) $display("cycle %0d: P=%h expected %h (opmode %b alumode %b)",
                                      cyc, P, ref_p, m_opm, m_alu);
        end
        checks++;
        if (PD !== ref_pd || PBD !== ref_pbd) begin
          failures++;
          if (failures < 10) $display("cycle %0d: pattern flags %b%b expected %b%b", cyc, PD, PBD, ref_pd, ref_pbd);
        end
        if (ref_cochk) begin
          checks++;
          if (CARRYOUT !== ref_co) failures++;
        end
      end
      if (cyc >= 4) begin
        checks++;
        if (P2 !== lat_exp[cyc - 4]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: latency instance P=%h expected %h", cyc, P2, lat_exp[cyc - 4]);
        end else lat_seen++;
        checks++;
        if (acout2 !== a2_hist[cyc - 2] || bcout2 !== b2_hist[cyc - 2]) failures++;
      end
      if (ref_ok) begin
        checks++;
        if (P3 !== ref3_p || co3 !== {ref3_co, 3'b000} || ccout3 !== ref3_co || msign3 !== ref3_ms) begin
          failures++;
          if (failures < 10) $display("cycle %0d: carry-select instance P=%h co=%b ms=%b expected %h %b %b (sel %0d)",
                                      cyc, P3, co3, msign3, ref3_p, ref3_co, ref3_ms, s3_csel);
        end
        checks++;
        if (acout3 !== s3_acin || bcout3 !== s3_bcin) failures++;
        checks++;
        if (P4 !== ref4_p || co4s !== ref4_co) begin
          failures++;
          if (failures < 10) $display("cycle %0d: FOUR12 P=%h co=%b expected %h %b", cyc, P4, co4s, ref4_p, ref4_co);
        end
        checks++;
        if (P5 !== ref5_p || co5s !== ref5_co) begin
          failures++;
          if (failures < 10) $display("cycle %0d: TWO24 P=%h co=%b expected %h %b", cyc, P5, co5s, ref5_p, ref5_co);
        end
        if (ref4_co[2:1] != 2'b00) lane_carries++;
      end
      // ---- the registers the last edge loaded feed the ALU next edge ----
      // PCIN has no register: the value driven now is the one the
      // arithmetic unit sees when the operands loaded at the last edge reach it.
      PCIN = {16'($urandom), 32'($urandom)};
      ccin3 = 1'($urandom);
      msin3 = 1'($urandom);
      if (cyc >= 1) begin
        model(s_a, s_b, s_c, PCIN, s_opm, s_alu, s_cin);
        if (s3_opm == {Z_PMACC, Y_ZERO, X_AB} && msin3) ms_hits++;
        model3(PCIN, ccin3, msin3);
        simd_ref({s_a, s_b}, s_c, s_alus, s_cin, 4, ref4_p, ref4_co);
        simd_ref({s_a, s_b}, s_c, s_alus, s_cin, 2, ref5_p, ref5_co);
        ref_ok = 1'b1;
      end
      // ---- drive the next operation ----
      k = $urandom_range(NOPS - 1);
      op_count[k]++;
      {OPMODE, ALUMODE} = ops[k];
      A = A_W'($urandom);
      B = B_W'($urandom);
      r48 = {16'($urandom), 32'($urandom)};
      C = r48;
      if ($urandom_range(3) == 0) C = {r48[47:8] ^ 40'h0, 8'h00};  // near-pattern values
      CARRYIN = 1'($urandom);
      if ($urandom_range(7) == 0) C = {A, B} ^ {40'h0, 8'($urandom)}; // xor/pattern hits
      A2 = A_W'($urandom);
      B2 = B_W'($urandom);
      lat_exp[cyc] = P_W'(longint'($signed(A2[24:0])) * longint'($signed(B2)));
      a2_hist[cyc] = A2;
      b2_hist[cyc] = B2;
      ACIN3 = A_W'($urandom);
      BCIN3 = B_W'($urandom);
      case ($urandom_range(2))
        0: opm3 = OPM_ADD;
        1: opm3 = OPM_MUL;
        default: opm3 = {Z_PMACC, Y_ZERO, X_AB};
      endcase
      csel3 = 3'($urandom);
      csel_count[csel3]++;
      cin3 = 1'($urandom);
      case ($urandom_range(3))
        0: alu_s = 4'b0000; 1: alu_s = 4'b0011; 2: alu_s = 4'b0001; default: alu_s = 4'b0010;
      endcase
      s3_acin = ACIN3; s3_bcin = BCIN3; s3_c = C; s3_opm = opm3; s3_csel = csel3; s3_cin = cin3;
      s_alus = alu_s;
      s_a = A; s_b = B; s_c = C; s_opm = OPMODE; s_alu = ALUMODE; s_cin = CARRYIN;
      @(negedge clk);
    end
    foreach (op_count[i]) begin
      checks++;
      if (op_count[i] == 0) begin
        failures++;
        $display("operation %0d never exercised", i);
      end
    end
    foreach (csel_count[i]) begin
      checks++;
      if (csel_count[i] == 0) begin
        failures++;
        $display("carry source %0d never exercised", i);
      end
    end
    checks++;
    if (ms_hits == 0 || lane_carries == 0) begin
      failures++;
      $display("MULTSIGNIN or inner lane carries never exercised");
    end
    checks++;
    if (pd_hits == 0) begin
      failures++;
      $display("pattern detector never matched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A pattern-detect hit must happen at least once for the check to mean anything.
  int pd_hits = 0;
  always @(posedge clk) if (!rst && PD) pd_hits++;

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
