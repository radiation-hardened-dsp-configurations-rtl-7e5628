// hcis_top_tb: end-to-end test of the whole template library, hcis_top at its
// default configuration.
//
// A random stream of signed 16-bit operand sets is offered with in_valid;
// a set is taken when in_ready is high, and in_ready must drop for exactly
// the cycle after a taken set (checked against a model). For each taken set
// every template's expected result (sum, product or running sum of
// products since the last acc_clr) is computed with integer arithmetic and
// must appear on its port with its valid flag exactly at its latency (2 to
// 4 cycles); valid flags must be low otherwise.
// Every 40 cycles one single upset is emulated in every template at once,
// on the set taken at window cycle 10, rotating over replica 1, 2 and 3 (C
// or M register in front of the arithmetic unit gets random bits flipped)
// and the registered equality flag of the first comparison (templates that
// register it). Outputs must stay correct.
// Counted mechanisms, each required at least once: operands refused while
// in_ready is low, accumulator clear, accumulation, each upset kind hitting
// a checked result, the unique voters (slice and CLB comparator, and the
// reused-slice one) falling back to replica 3.
module hcis_top_tb;
  import hcis_pkg::*;

  localparam int NCYC = 4000;
  localparam int NT   = 12;
  localparam int LAT  [NT] = '{3, 4, 4, 4, 4, 2, 2, 3, 3, 3, 3, 4};
  localparam op_e OPS [NT] = '{OP_ADD, OP_MUL, OP_MACC, OP_MUL, OP_MACC, OP_ADD, OP_ADD, OP_MUL, OP_MUL, OP_MACC, OP_MACC, OP_MUL};
  localparam string NAME [NT] = '{"add_v1", "mul_v1", "macc_v1", "mul_v2", "macc_v2", "add_v3dsp", "add_v3clb", "mul_v3dsp", "mul_v3clb", "macc_v3dsp", "macc_v3clb", "mul_v4"};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [DATA_W-1:0] a, b;
  logic              in_valid, acc_clr, in_ready;
  logic [P_W-1:0]    out [NT];
  logic              ov  [NT];

  hcis_top dut (
    .clk, .rst, .a, .b, .in_valid, .acc_clr, .in_ready,
    .add_v1_out(out[0]), .add_v1_valid(ov[0]),
    .mul_v1_out(out[1]), .mul_v1_valid(ov[1]),
    .macc_v1_out(out[2]), .macc_v1_valid(ov[2]),
    .mul_v2_out(out[3]), .mul_v2_valid(ov[3]),
    .macc_v2_out(out[4]), .macc_v2_valid(ov[4]),
    .add_v3dsp_out(out[5]), .add_v3dsp_valid(ov[5]),
    .add_v3clb_out(out[6]), .add_v3clb_valid(ov[6]),
    .mul_v3dsp_out(out[7]), .mul_v3dsp_valid(ov[7]),
    .mul_v3clb_out(out[8]), .mul_v3clb_valid(ov[8]),
    .macc_v3dsp_out(out[9]), .macc_v3dsp_valid(ov[9]),
    .macc_v3clb_out(out[10]), .macc_v3clb_valid(ov[10]),
    .mul_v4_out(out[11]), .mul_v4_valid(ov[11])
  );

  logic [P_W-1:0] exp_val [NT][NCYC + 8];
  logic           exp_vld [NCYC + 8][NT];
  logic [P_W-1:0] flip;
  int             hit [4];
  int             n_refused = 0, n_clr = 0, n_accum = 0;
  int             n_r3_dsp = 0, n_r3_clb = 0, n_r3_v4 = 0;
  longint         acc;

  // Emulated single upsets: kind 0..2 = replica k, 3 = equality flag.
  task automatic upset(input int kind, input int w);
    case (kind)
      0: begin
        if (w == 11) dut.u_add_v1.g_rep[0].u_op.u_dsp.c_q ^= flip;
        if (w == 12) dut.u_mul_v1.g_rep[0].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v1.g_rep[0].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v2.g_rep[0].u_opc.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v2.g_rep[0].u_opc.u_dsp.m_q ^= flip;
        if (w == 11) dut.u_add_v3dsp.g_rep[0].u_op.u_dsp.c_q ^= flip;
        if (w == 11) dut.u_add_v3clb.g_rep[0].u_op.u_dsp.c_q ^= flip;
        if (w == 12) dut.u_mul_v3dsp.g_rep[0].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v3clb.g_rep[0].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v3dsp.g_rep[0].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v3clb.g_rep[0].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v4.u_opc.u_dsp.m_q ^= flip;
      end
      1: begin
        if (w == 11) dut.u_add_v1.g_rep[1].u_op.u_dsp.c_q ^= flip;
        if (w == 12) dut.u_mul_v1.g_rep[1].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v1.g_rep[1].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v2.g_rep[1].u_opc.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v2.g_rep[1].u_opc.u_dsp.m_q ^= flip;
        if (w == 11) dut.u_add_v3dsp.g_rep[1].u_op.u_dsp.c_q ^= flip;
        if (w == 11) dut.u_add_v3clb.g_rep[1].u_op.u_dsp.c_q ^= flip;
        if (w == 12) dut.u_mul_v3dsp.g_rep[1].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v3clb.g_rep[1].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v3dsp.g_rep[1].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v3clb.g_rep[1].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v4.g_rep[1].u_op.u_dsp.m_q ^= flip;
      end
      2: begin
        if (w == 11) dut.u_add_v1.g_rep[2].u_op.u_dsp.c_q ^= flip;
        if (w == 12) dut.u_mul_v1.g_rep[2].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v1.g_rep[2].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v2.g_rep[2].u_opc.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v2.g_rep[2].u_opc.u_dsp.m_q ^= flip;
        if (w == 11) dut.u_add_v3dsp.g_rep[2].u_op.u_dsp.c_q ^= flip;
        if (w == 11) dut.u_add_v3clb.g_rep[2].u_op.u_dsp.c_q ^= flip;
        if (w == 12) dut.u_mul_v3dsp.g_rep[2].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v3clb.g_rep[2].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v3dsp.g_rep[2].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_macc_v3clb.g_rep[2].u_op.u_dsp.m_q ^= flip;
        if (w == 12) dut.u_mul_v4.g_rep[2].u_op.u_dsp.m_q ^= flip;
      end
      default: begin
        if (w == 13) dut.u_add_v1.g_rep[0].u_cmp.u_dsp.pd_q = 1'b0;
        if (w == 14) dut.u_mul_v1.g_rep[0].u_cmp.u_dsp.pd_q = 1'b0;
        if (w == 14) dut.u_macc_v1.g_rep[0].u_cmp.u_dsp.pd_q = 1'b0;
        if (w == 14) dut.u_mul_v2.g_rep[0].u_opc.u_dsp.pd_q = 1'b0;
        if (w == 14) dut.u_macc_v2.g_rep[0].u_opc.u_dsp.pd_q = 1'b0;
        if (w == 14) dut.u_mul_v4.u_opc.u_dsp.pd_q = 1'b0;
      end
    endcase
  endtask

  initial begin
    longint sa, sb;
    int     w, kind;
    logic   taken_last, taken;
    a = '0; b = '0; in_valid = 1'b0; acc_clr = 1'b0; acc = 0; flip = '1;
    taken_last = 1'b0;
    foreach (hit[i]) hit[i] = 0;
    for (int c = 0; c < NCYC + 8; c++)
      for (int d = 0; d < NT; d++) exp_vld[c][d] = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      w    = cyc % 40;
      kind = (cyc / 40) % 4;
      if (w == 8) flip = {16'($urandom), 32'($urandom)} | 48'h1;
      upset(kind, w);
      #1;
      for (int d = 0; d < NT; d++) begin
        checks++;
        if (ov[d] !== exp_vld[cyc][d]) begin
          failures++;
          if (failures < 10) $display("cycle %0d %s: valid=%b expected %b", cyc, NAME[d], ov[d], exp_vld[cyc][d]);
        end
        if (exp_vld[cyc][d]) begin
          checks++;
          if (out[d] !== exp_val[d][cyc]) begin
            failures++;
            if (failures < 10) $display("cycle %0d %s: out=%h expected %h (upset kind %0d)",
                                        cyc, NAME[d], out[d], exp_val[d][cyc], kind);
          end
          if (w == 10 + LAT[d]) hit[kind]++;
        end
      end
      if (ov[7] && !dut.u_mul_v3dsp.eq) n_r3_dsp++;
      if (ov[8] && !dut.u_mul_v3clb.eq) n_r3_clb++;
      if (ov[11] && !dut.u_mul_v4.eq)   n_r3_v4++;
      checks++;
      if (in_ready !== !taken_last) begin
        failures++;
        if (failures < 10) $display("cycle %0d: in_ready=%b", cyc, in_ready);
      end
      // operands
      if (cyc >= NCYC - 8)        in_valid = 1'b0;
      else if (w == 9 || w == 39) in_valid = 1'b0;
      else if (w == 0 || w == 10) in_valid = 1'b1;
      else                        in_valid = ($urandom_range(3) != 0);
      acc_clr = (w == 0) || ($urandom_range(15) == 0 && w > 20);
      case ($urandom_range(7))
        0: begin a = 16'h8000; b = 16'h8000; end
        1: begin a = 16'h7fff; b = 16'h8001; end
        default: begin a = DATA_W'($urandom); b = DATA_W'($urandom); end
      endcase
      taken = in_valid && !taken_last;
      if (in_valid && taken_last) n_refused++;
      if (taken) begin
        sa = longint'($signed(a));
        sb = longint'($signed(b));
        if (acc_clr) n_clr++; else n_accum++;
        acc = acc_clr ? sa * sb : acc + sa * sb;
        for (int d = 0; d < NT; d++) begin
          exp_vld[cyc + LAT[d]][d] = 1'b1;
          case (OPS[d])
            OP_ADD:  exp_val[d][cyc + LAT[d]] = P_W'(sa + sb);
            OP_MUL:  exp_val[d][cyc + LAT[d]] = P_W'(sa * sb);
            default: exp_val[d][cyc + LAT[d]] = P_W'(acc);
          endcase
        end
      end
      taken_last = taken;
      @(negedge clk);
    end
    foreach (hit[i]) begin
      checks++;
      if (hit[i] == 0) begin failures++; $display("upset kind %0d never hit a checked result", i); end
    end
    checks++;
    if (n_refused == 0 || n_clr == 0 || n_accum == 0) begin
      failures++;
      $display("throttle/clear/accumulate not all exercised: %0d %0d %0d", n_refused, n_clr, n_accum);
    end
    checks++;
    if (n_r3_dsp == 0 || n_r3_clb == 0 || n_r3_v4 == 0) begin
      failures++;
      $display("unique-voter fallback not exercised: %0d %0d %0d", n_r3_dsp, n_r3_clb, n_r3_v4);
    end
    $display("mechanisms: refused=%0d clear=%0d accumulate=%0d upset hits=%0d/%0d/%0d/%0d replica3 picks=%0d/%0d/%0d",
             n_refused, n_clr, n_accum, hit[0], hit[1], hit[2], hit[3], n_r3_dsp, n_r3_clb, n_r3_v4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
