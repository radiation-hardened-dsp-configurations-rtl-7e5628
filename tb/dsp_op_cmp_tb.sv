// dsp_op_cmp_tb: self-checking test of the slice that does an operation and
// then a comparison (multiplier + voter configuration).
//
// A multiplier and a multiply-accumulator take random signed operands at
// random intervals of at least two cycles (the slice's maximum rate). In the
// cycle the new result sits in P, the test drives the "other replica" input
// with that expected result, sometimes with one bit flipped. One cycle later
// out_valid must be high with p equal to the expected result and eq telling
// whether the other value matched. out_valid must be low in all other
// cycles (latency 4).
module dsp_op_cmp_tb;
  import hcis_pkg::*;

  localparam int NCYC = 2000;
  localparam int LAT  = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [DATA_W-1:0] a, b;
  logic              in_valid, acc_clr;
  logic [P_W-1:0]    c_o [2], p [2];
  logic              eq [2], ov [2];

  dsp_op_cmp #(.OP(OP_MUL))  u_mul  (.clk, .rst, .a, .b, .in_valid, .acc_clr,
                                     .c_other(c_o[0]), .p(p[0]), .eq(eq[0]), .out_valid(ov[0]));
  dsp_op_cmp #(.OP(OP_MACC)) u_macc (.clk, .rst, .a, .b, .in_valid, .acc_clr,
                                     .c_other(c_o[1]), .p(p[1]), .eq(eq[1]), .out_valid(ov[1]));

  // Schedules indexed by cycle
  logic [P_W-1:0] exp_val [2][NCYC + 8];
  logic           exp_vld [NCYC + 8];
  logic [P_W-1:0] cmp_val [2][NCYC + 8];
  logic           cmp_set [NCYC + 8];
  logic           exp_eq  [2][NCYC + 8];
  longint         acc;
  int             n_eq = 0, n_ne = 0, last_issue = -10;

  initial begin
    longint sa, sb, prod;
    a = '0; b = '0; in_valid = 1'b0; acc_clr = 1'b0; acc = 0;
    c_o[0] = '0; c_o[1] = '0;
    for (int n = 0; n < NCYC + 8; n++) begin exp_vld[n] = 1'b0; cmp_set[n] = 1'b0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      // outputs
      checks++;
      if (ov[0] !== exp_vld[cyc] || ov[1] !== exp_vld[cyc]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: out_valid %b%b expected %b", cyc, ov[0], ov[1], exp_vld[cyc]);
      end
      if (exp_vld[cyc]) begin
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (p[k] !== exp_val[k][cyc] || eq[k] !== exp_eq[k][cyc]) begin
            failures++;
            if (failures < 10) $display("cycle %0d slice %0d: p=%h eq=%b expected %h %b",
                                        cyc, k, p[k], eq[k], exp_val[k][cyc], exp_eq[k][cyc]);
          end
          if (exp_eq[k][cyc]) n_eq++; else n_ne++;
        end
      end
      // other-replica input: the expected result in its compare cycle, noise otherwise
      for (int k = 0; k < 2; k++)
        c_o[k] = cmp_set[cyc] ? cmp_val[k][cyc] : {16'($urandom), 32'($urandom)};
      // operands
      in_valid = (cyc - last_issue >= 2) && ($urandom_range(2) != 0) && cyc < NCYC - 8;
      acc_clr  = (last_issue < 0) || ($urandom_range(7) == 0);
      a = DATA_W'($urandom);
      b = DATA_W'($urandom);
      if (in_valid) begin
        last_issue = cyc;
        sa = longint'($signed(a));
        sb = longint'($signed(b));
        prod = sa * sb;
        acc = acc_clr ? prod : acc + prod;
        exp_vld[cyc + LAT] = 1'b1;
        exp_val[0][cyc + LAT] = P_W'(prod);
        exp_val[1][cyc + LAT] = P_W'(acc);
        cmp_set[cyc + LAT - 1] = 1'b1;
        for (int k = 0; k < 2; k++) begin
          exp_eq[k][cyc + LAT] = ($urandom_range(1) == 0);
          cmp_val[k][cyc + LAT - 1] = exp_val[k][cyc + LAT] ^
              (exp_eq[k][cyc + LAT] ? 48'd0 : (48'd1 << $urandom_range(P_W - 1)));
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_eq == 0 || n_ne == 0) begin
      failures++;
      $display("equal or unequal comparison never exercised");
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
