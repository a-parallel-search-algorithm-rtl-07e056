// kwta_tie_breaker: the Select() function of the kWTA search.
//
// Used when all data bits have been examined and more than k-nW competitors
// remain: they all carry the same value, and the lowest-indexed k-nW of them
// are made winners. The choice is resolved from the top of the counting
// tree down, one level per cycle (tie_lvl = LEVELS-1 first):
//   level v >= 1: competitors in child blocks that fit completely under k
//                 become winners, the block holding the boundary keeps its
//                 competitors, all others drop out; nW becomes the count
//                 before the boundary block. Without a boundary block the
//                 winners now number exactly k and the search ends.
//   level 0:      the 1-counters' worms, entering at nW, select the
//                 lowest-indexed rows directly; the search ends.
// With a single-level tree this is one cycle, as in the document; the
// level-by-level descent for deeper trees is this design's reading of the
// document's "about one cycle per level". Purely combinational.
module kwta_tie_breaker
  import kwta_pkg::*;
#(
  parameter int unsigned K      = 5,
  parameter int unsigned N      = 1024,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned NS    = cnt_lines(K),
  localparam int unsigned CW    = NS - 1,
  localparam int unsigned LVW   = $clog2(LEVELS + 1)
) (
  input  logic           tie,                // tie phase active
  input  logic [LVW-1:0] tie_lvl,
  input  logic [N-1:0]   c,                  // remaining competitors
  input  logic [N-1:0]   sel,
  input  logic [N-1:0]   lv_full [LEVELS],
  input  logic [N-1:0]   lv_keep [LEVELS],
  input  logic [NS-1:0]  lv_base [LEVELS],
  input  logic           lv_bnd  [LEVELS],
  output logic [N-1:0]   win_set,            // inputs to add to the winners
  output logic [N-1:0]   keep,               // competitors that remain
  output logic [NS-1:0]  nw_new,             // winner count after this cycle
  output logic           tie_done            // k winners are now fixed
);
  always_comb begin
    win_set  = '0;
    keep     = '1;
    nw_new   = '0;
    tie_done = 1'b0;
    if (tie) begin
      if (tie_lvl == '0) begin
        win_set  = sel & c;
        keep     = '0;
        nw_new   = {1'b0, CW'(K)};
        tie_done = 1'b1;
      end else begin
        for (int v = 1; v < int'(LEVELS); v++)
          if (tie_lvl == LVW'(v)) begin
            win_set  = c & lv_full[v];
            keep     = lv_keep[v];
            nw_new   = lv_bnd[v] ? lv_base[v] : {1'b0, CW'(K)};
            tie_done = !lv_bnd[v];
          end
      end
    end
  end

endmodule
