// kwta_accumulator: accumulator of the multi-level counting tree.
//
// A series connection of L Sigma-circuits. The chain starts from chain_in
// (zero in a lower-level accumulator, the stored winner count nW in the top
// one, or nW in the level being resolved during tie breaking) and adds the
// counts of its L child blocks in index order, child 0 first. The end of the
// chain is the block's count, saturated above k.
//
// The running sums also serve the hierarchical tie breaker: with s_-1 =
// chain_in and s_c the sum after child c,
//   full[c] = s_c <= k               (all competitors of child c can win)
//   bnd[c]  = s_(c-1) < k < s_c      (child c holds the k/(k+1) boundary)
//   base    = s_(c-1) of the boundary child (0 if there is none).
// The series chain of Sigma-circuits is the document's; the tie-breaking
// outputs are this design's way of resolving ties one level per cycle.
// Purely combinational.
module kwta_accumulator
  import kwta_pkg::*;
#(
  parameter int unsigned K = 5,
  parameter int unsigned L = 8,   // links (children) per accumulator
  localparam int unsigned NS = cnt_lines(K),
  localparam int unsigned CW = NS - 1
) (
  input  logic [NS-1:0] child [L],
  input  logic [NS-1:0] chain_in,
  output logic [NS-1:0] sum,
  output logic [L-1:0]  full,
  output logic [L-1:0]  bnd,
  output logic          has_bnd,
  output logic [NS-1:0] base
);
  logic [NS-1:0] s [L+1];  // s[c] = running sum before child c

  assign s[0] = chain_in;

  for (genvar c = 0; c < L; c++) begin : g_link
    kwta_sigma #(.K(K)) u_sigma (.a(s[c]), .b(child[c]), .y(s[c+1]));
  end

  always_comb begin
    has_bnd = 1'b0;
    base    = '0;
    for (int c = 0; c < L; c++) begin
      full[c] = !s[c+1][NS-1];
      bnd[c]  = !s[c][NS-1] && (s[c][CW-1:0] < CW'(K)) && s[c+1][NS-1];
      if (bnd[c]) begin
        has_bnd = 1'b1;
        base    = s[c];
      end
    end
  end

  assign sum = s[L];

endmodule
