// tmr3_reuse_tb: self-checking test of tmr3_reuse: TMR with triplicated voter in three reused slices.
//
// Every operation class the template supports is instantiated; all see the
// same random stream of signed 16-bit operands (at most one set every second cycle)
// and occasional acc_clr. The expected result of each set is computed with
// integer arithmetic and must appear with out_valid exactly at the
// template's latency; out_valid must be low in all other cycles.
// Every 40 cycles one single upset is emulated, in turn, on the operand set
// taken at cycle 10 of the window: the pipeline register in front of the
// arithmetic unit of replica 1, 2 or 3 (C register for an adder, M register
// otherwise) gets random bits flipped, or the registered equality flag of the first comparison is cleared in
// the cycle the voter uses it. A multiply-accumulate replica hit by an upset stays wrong until the
// next acc_clr at the start of the following window. The outputs must stay
// correct throughout, and each of the four upset kinds must have hit a
// checked result.
module tmr3_reuse_tb;
  import hcis_pkg::*;

  localparam int NCYC = 2000;
  localparam int NDUT = 2;
  localparam int NK   = 4;
  localparam int LAT  [NDUT] = '{4, 4};
  localparam op_e OPS [NDUT] = '{OP_MUL, OP_MACC};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [DATA_W-1:0] a, b;
  logic              in_valid, acc_clr;
  logic [P_W-1:0]    out [NDUT];
  logic              ov  [NDUT];

  tmr3_reuse #(.OP(OP_MUL)) d_mul (
    .clk, .rst, .a, .b, .in_valid, .acc_clr, .out(out[0]), .out_valid(ov[0]));
  tmr3_reuse #(.OP(OP_MACC)) d_macc (
    .clk, .rst, .a, .b, .in_valid, .acc_clr, .out(out[1]), .out_valid(ov[1]));

  logic [P_W-1:0] exp_val [NDUT][NCYC + 8];
  logic           exp_vld [NCYC + 8][NDUT];
  logic [P_W-1:0] flip;
  int             hit [4];
  longint         acc;

  // Emulated single upset of kind 0..2 (replica k) or 3 (equality flag),
  // applied at window cycle w to the register that holds the data of the
  // operand set taken at w = 10.
  task automatic upset(input int kind, input int w);
    case (kind)
      0: begin
        if (w == 12) d_mul.g_rep[0].u_opc.u_dsp.m_q ^= flip;
        if (w == 12) d_macc.g_rep[0].u_opc.u_dsp.m_q ^= flip;
      end
      1: begin
        if (w == 12) d_mul.g_rep[1].u_opc.u_dsp.m_q ^= flip;
        if (w == 12) d_macc.g_rep[1].u_opc.u_dsp.m_q ^= flip;
      end
      2: begin
        if (w == 12) d_mul.g_rep[2].u_opc.u_dsp.m_q ^= flip;
        if (w == 12) d_macc.g_rep[2].u_opc.u_dsp.m_q ^= flip;
      end
      default: begin
        if (w == 14) d_mul.g_rep[0].u_opc.u_dsp.pd_q = 1'b0;
        if (w == 14) d_macc.g_rep[0].u_opc.u_dsp.pd_q = 1'b0;
      end
    endcase
  endtask

  initial begin
    longint sa, sb;
    int     w, kind, last_issue;
    a = '0; b = '0; in_valid = 1'b0; acc_clr = 1'b0; acc = 0; flip = '1;
    last_issue = -10;
    foreach (hit[i]) hit[i] = 0;
    for (int c = 0; c < NCYC + 8; c++)
      for (int d = 0; d < NDUT; d++) exp_vld[c][d] = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      w    = cyc % 40;
      kind = (cyc / 40) % NK;
      if (w == 8) flip = {16'($urandom), 32'($urandom)} | 48'h1;
      upset(kind, w);
      #1;
      for (int d = 0; d < NDUT; d++) begin
        checks++;
        if (ov[d] !== exp_vld[cyc][d]) begin
          failures++;
          if (failures < 10) $display("cycle %0d dut %0d: out_valid=%b expected %b", cyc, d, ov[d], exp_vld[cyc][d]);
        end
        if (exp_vld[cyc][d]) begin
          checks++;
          if (out[d] !== exp_val[d][cyc]) begin
            failures++;
            if (failures < 10) $display("cycle %0d dut %0d: out=%h expected %h (upset kind %0d, w %0d)",
                                        cyc, d, out[d], exp_val[d][cyc], kind, w);
          end
          if (w == 10 + LAT[d]) hit[kind]++;
        end
      end
      // operands
      if (cyc >= NCYC - 8)        in_valid = 1'b0;
      else if (w == 0 || w == 10) in_valid = 1'b1;
      else if (2 == 2 && (w == 39 || w == 9 || cyc - last_issue < 2)) in_valid = 1'b0;
      else                        in_valid = ($urandom_range(2) != 0);
      acc_clr = (w == 0) || ($urandom_range(15) == 0 && w > 20);
      case ($urandom_range(7))
        0: begin a = 16'h8000; b = 16'h8000; end
        1: begin a = 16'h7fff; b = 16'h7fff; end
        default: begin a = DATA_W'($urandom); b = DATA_W'($urandom); end
      endcase
      if (in_valid) begin
        last_issue = cyc;
        sa = longint'($signed(a));
        sb = longint'($signed(b));
        acc = acc_clr ? sa * sb : acc + sa * sb;
        for (int d = 0; d < NDUT; d++) begin
          exp_vld[cyc + LAT[d]][d] = 1'b1;
          case (OPS[d])
            OP_ADD:  exp_val[d][cyc + LAT[d]] = P_W'(sa + sb);
            OP_MUL:  exp_val[d][cyc + LAT[d]] = P_W'(sa * sb);
            default: exp_val[d][cyc + LAT[d]] = P_W'(acc);
          endcase
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < NK; i++) begin
      checks++;
      if (hit[i] == 0) begin
        failures++;
        $display("upset kind %0d never hit a checked result", i);
      end
    end
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
