// tmr_merge: the fabric (CLB) logic that follows a triplicated voter. It
// receives the results of replicas 1 and 2 and the three pairwise equality
// flags made by the comparator slices, and picks the result to forward
// (replica 3 needs no data path: when it is needed, replica 2 equals it):
//
//   out = v1  if eq12 or eq13  (replica 1 agrees with another one)
//         v2  if only eq23     (replica 1 is the odd one out)
//         v1  otherwise        (no two replicas agree)
//
// Any one wrong replica result, or any one wrong equality flag, leaves out
// correct; eq13 also covers a wrong replica 2 together with a wrongly set
// eq23. Purely combinational. That the merge sits in CLBs and takes the
// comparator outputs follows the triplicated-voter schemes; the selection
// rule itself is this design's choice.
module tmr_merge
  import hcis_pkg::*;
#(
  parameter int W = P_W
) (
  input  logic [W-1:0] v1,
  input  logic [W-1:0] v2,
  input  logic         eq12,
  input  logic         eq23,
  input  logic         eq13,
  output logic [W-1:0] out
);

  always_comb begin
    if (eq12 || eq13) out = v1;
    else if (eq23)    out = v2;
    else              out = v1;
  end

endmodule
