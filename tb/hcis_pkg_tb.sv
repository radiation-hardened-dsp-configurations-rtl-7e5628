// hcis_pkg_tb: self-checking test of the shared package.
//
// Checks the slice widths, the OPMODE settings of the templates against
// their bit patterns in the DSP48E encoding ({Z, Y, X}: add 011_00_11,
// multiply 000_01_01, multiply-accumulate 010_01_01, hold 010_00_00, pass
// PCIN 001_00_00), the ALUMODE codes, the latency functions for every
// operation class, and sext48 on 20000 random 16-bit values plus the
// extreme ones, against an integer sign extension. No clocked logic is
// involved; the watchdog only guards against a hang.
module hcis_pkg_tb;
  import hcis_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch: %s", what);
    end
  endtask

  function automatic logic [P_W-1:0] ref_sext(logic [DATA_W-1:0] v);
    longint s;
    s = longint'(v);
    if (v >= 16'h8000) s = s - 65536;
    return P_W'(s);
  endfunction

  initial begin
    logic [DATA_W-1:0] v;
    check(A_W == 30 && B_W == 18 && P_W == 48 && MUL_A_W == 25 && DATA_W == 16, "widths");
    check(OPM_ADD  == 7'b011_00_11, "OPM_ADD");
    check(OPM_MUL  == 7'b000_01_01, "OPM_MUL");
    check(OPM_MACC == 7'b010_01_01, "OPM_MACC");
    check(OPM_HOLD == 7'b010_00_00, "OPM_HOLD");
    check(OPM_PASS == 7'b001_00_00, "OPM_PASS");
    check(ALU_ADD == 4'b0000 && ALU_ZSUB == 4'b0011 && ALU_NZADD == 4'b0001 && ALU_NSUM == 4'b0010, "ALUMODE");
    check(op_latency(OP_ADD) == 2, "op_latency ADD");
    check(op_latency(OP_MUL) == 3, "op_latency MUL");
    check(op_latency(OP_MACC) == 3, "op_latency MACC");
    check(ctrl_delay(OP_ADD) == 0, "ctrl_delay ADD");
    check(ctrl_delay(OP_MUL) == 1, "ctrl_delay MUL");
    check(ctrl_delay(OP_MACC) == 1, "ctrl_delay MACC");
    check(sext48(16'h7FFF) == 48'h0000_0000_7FFF, "sext48 max");
    check(sext48(16'h8000) == 48'hFFFF_FFFF_8000, "sext48 min");
    check(sext48(16'hFFFF) == 48'hFFFF_FFFF_FFFF, "sext48 -1");
    for (int n = 0; n < 20000; n++) begin
      v = DATA_W'($urandom);
      check(sext48(v) == ref_sext(v), $sformatf("sext48(%h)", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
