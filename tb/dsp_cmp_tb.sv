// dsp_cmp_tb: self-checking test of the comparator slice DSP(=).
//
// A registered comparator (PREG = 1) and an unregistered one (PREG = 0) get
// the same random pairs (x, y): equal pairs, pairs that differ in one random
// bit (including bit 47 and bit 0) and unrelated pairs. The registered one
// must give p = x and eq = (x == y) exactly one cycle later, the other in
// the same cycle.
module dsp_cmp_tb;
  import hcis_pkg::*;

  localparam int NCYC = 2000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [P_W-1:0] x, y, p1, p0;
  logic           eq1, eq0;

  dsp_cmp #(.PREG(1)) u_reg  (.clk, .rst, .x, .y, .p(p1), .eq(eq1));
  dsp_cmp #(.PREG(0)) u_comb (.clk, .rst, .x, .y, .p(p0), .eq(eq0));

  logic [P_W-1:0] px;
  logic           peq, started;
  int             n_eq = 0, n_ne = 0;

  initial begin
    x = '0; y = '0; px = '0; peq = 1'b0; started = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      x = {16'($urandom), 32'($urandom)};
      case ($urandom_range(3))
        0, 1: y = x;
        2:    y = x ^ (48'd1 << $urandom_range(P_W - 1));
        default: y = {16'($urandom), 32'($urandom)};
      endcase
      #1;
      checks++;
      if (p0 !== x || eq0 !== (x == y)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: unregistered p=%h eq=%b", cyc, p0, eq0);
      end
      if (x == y) n_eq++; else n_ne++;
      @(negedge clk);
      checks++;
      if (p1 !== x || eq1 !== (x == y)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: registered p=%h eq=%b expected %h %b", cyc, p1, eq1, x, x == y);
      end
    end
    checks++;
    if (n_eq == 0 || n_ne == 0) failures++;
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
