// kwta_sigma: Sigma-circuit, one link of an accumulator.
//
// Adds two count bundles and saturates the result: any sum above k is
// reported only as "overflow" (more than k), which is all the winner
// decision needs. A bundle is {overflow, binary count 0..k} on
// 1+ceil(log2(k+1)) lines, the number of inputs per Sigma-circuit the
// document gives; its internal circuit is not reproduced, only its function
// (a saturating adder). Purely combinational.
module kwta_sigma
  import kwta_pkg::*;
#(
  parameter int unsigned K = 5,
  localparam int unsigned NS = cnt_lines(K),
  localparam int unsigned CW = NS - 1
) (
  input  logic [NS-1:0] a,  // running sum from the previous link
  input  logic [NS-1:0] b,  // count of one child block
  output logic [NS-1:0] y
);
  logic [CW:0] sum;

  always_comb begin
    sum = {1'b0, a[CW-1:0]} + {1'b0, b[CW-1:0]};
    if (a[NS-1] || b[NS-1] || (sum > (CW+1)'(K))) y = {1'b1, {CW{1'b0}}};
    else                                          y = {1'b0, sum[CW-1:0]};
  end

endmodule
