// tmr_merge_tb: self-checking test of the CLB merge after a triplicated voter.
//
// Each trial draws a correct value, makes three replica values from it and
// injects at most one fault: a wrong replica (1, 2 or 3) or one wrong
// equality flag. The flags are computed from the replica values the way the
// comparators would (eq12 = r1 == r2, and so on), then the chosen flag is
// inverted for a flag fault. With any single fault the merge must forward
// the correct value. Trials in which no two replicas agree are run last:
// then the merge must forward replica 1.
module tmr_merge_tb;
  import hcis_pkg::*;

  localparam int NTRIAL = 4000;

  int checks = 0, failures = 0;
  int fault_seen [5];   // none, r1, r2, r3, flag

  logic [P_W-1:0] v1, v2, out;
  logic           eq12, eq23, eq13;

  tmr_merge #(.W(P_W)) dut (.v1, .v2, .eq12, .eq23, .eq13, .out);

  initial begin
    logic [P_W-1:0] good, r [3];
    int             kind, f;
    foreach (fault_seen[i]) fault_seen[i] = 0;
    for (int t = 0; t < NTRIAL; t++) begin
      good = {16'($urandom), 32'($urandom)};
      r[0] = good; r[1] = good; r[2] = good;
      kind = $urandom_range(4);
      if (kind >= 1 && kind <= 3) r[kind - 1] = good ^ (48'd1 << $urandom_range(P_W - 1));
      v1 = r[0]; v2 = r[1];
      eq12 = (r[0] == r[1]); eq23 = (r[1] == r[2]); eq13 = (r[0] == r[2]);
      if (kind == 4) begin
        f = $urandom_range(2);
        if (f == 0) eq12 = ~eq12; else if (f == 1) eq23 = ~eq23; else eq13 = ~eq13;
      end
      fault_seen[kind]++;
      #1;
      checks++;
      if (out !== good) begin
        failures++;
        if (failures < 10) $display("trial %0d kind %0d: out=%h expected %h flags %b%b%b",
                                    t, kind, out, good, eq12, eq23, eq13);
      end
      #1;
    end
    // no two replicas agree: replica 1 is forwarded
    for (int t = 0; t < 100; t++) begin
      v1 = {16'($urandom), 32'($urandom)};
      v2 = ~v1;
      eq12 = 1'b0; eq23 = 1'b0; eq13 = 1'b0;
      #1;
      checks++;
      if (out !== v1) failures++;
      #1;
    end
    foreach (fault_seen[i]) begin
      checks++;
      if (fault_seen[i] == 0) begin
        failures++;
        $display("fault kind %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTRIAL * 4 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
