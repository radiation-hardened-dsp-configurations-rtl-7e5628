// dsp_op_tb: self-checking test of the operation class instances.
//
// One adder, one multiplier and one multiply-accumulator see the same random
// stream of signed 16-bit operands, with in_valid high about two cycles in
// three and acc_clr now and then. For every valid set the expected result is
// computed with integer arithmetic and must appear with out_valid exactly
// op_latency cycles later (2 for the adder, 3 otherwise); out_valid must be
// low in every other cycle, and p must hold its value between results.
module dsp_op_tb;
  import hcis_pkg::*;

  localparam int NCYC = 2000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [DATA_W-1:0] a, b;
  logic              in_valid, acc_clr;
  logic [P_W-1:0]    p   [3], pc [3];
  logic              ov  [3];

  dsp_op #(.OP(OP_ADD))  u_add  (.clk, .rst, .a, .b, .in_valid, .acc_clr, .p(p[0]), .pcout(pc[0]), .out_valid(ov[0]));
  dsp_op #(.OP(OP_MUL))  u_mul  (.clk, .rst, .a, .b, .in_valid, .acc_clr, .p(p[1]), .pcout(pc[1]), .out_valid(ov[1]));
  dsp_op #(.OP(OP_MACC)) u_macc (.clk, .rst, .a, .b, .in_valid, .acc_clr, .p(p[2]), .pcout(pc[2]), .out_valid(ov[2]));

  localparam int LAT [3] = '{2, 3, 3};

  logic [P_W-1:0] exp_val [3][NCYC + 8];
  logic           exp_vld [3][NCYC + 8];
  logic [P_W-1:0] last    [3];
  longint         acc;
  int             clr_seen = 0, hold_seen = 0;

  initial begin
    longint sa, sb;
    a = '0; b = '0; in_valid = 1'b0; acc_clr = 1'b0; acc = 0;
    for (int k = 0; k < 3; k++) begin
      last[k] = '0;
      for (int n = 0; n < NCYC + 8; n++) exp_vld[k][n] = 1'b0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (ov[k] !== exp_vld[k][cyc]) begin
          failures++;
          if (failures < 10) $display("cycle %0d op %0d: out_valid=%b expected %b", cyc, k, ov[k], exp_vld[k][cyc]);
        end
        if (exp_vld[k][cyc]) last[k] = exp_val[k][cyc];
        else if (k == 2 && cyc > 0) hold_seen++;
        checks++;
        if (p[k] !== last[k] || pc[k] !== last[k]) begin
          failures++;
          if (failures < 10) $display("cycle %0d op %0d: p=%h expected %h", cyc, k, p[k], last[k]);
        end
      end
      in_valid = ($urandom_range(2) != 0) && cyc < NCYC - 8;
      acc_clr  = (cyc == 0) || ($urandom_range(15) == 0);
      case ($urandom_range(5))
        0: begin a = 16'h8000; b = 16'h8000; end
        1: begin a = 16'h7fff; b = 16'h8000; end
        default: begin a = DATA_W'($urandom); b = DATA_W'($urandom); end
      endcase
      if (in_valid) begin
        sa = longint'($signed(a));
        sb = longint'($signed(b));
        if (acc_clr) begin acc = sa * sb; clr_seen++; end
        else acc = acc + sa * sb;
        exp_vld[0][cyc + LAT[0]] = 1'b1; exp_val[0][cyc + LAT[0]] = P_W'(sa + sb);
        exp_vld[1][cyc + LAT[1]] = 1'b1; exp_val[1][cyc + LAT[1]] = P_W'(sa * sb);
        exp_vld[2][cyc + LAT[2]] = 1'b1; exp_val[2][cyc + LAT[2]] = P_W'(acc);
      end
      @(negedge clk);
    end
    checks++;
    if (clr_seen == 0 || hold_seen == 0) begin
      failures++;
      $display("accumulator clear or hold never exercised");
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
