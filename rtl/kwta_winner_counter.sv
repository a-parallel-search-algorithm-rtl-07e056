// kwta_winner_counter: counting tree of the winner decision.
//
// Computes DET = n(T) + nW, the number of top dogs plus the winners already
// found, saturated above k. The N inputs are split into N/N1 blocks of N1,
// each counted by a 1-counter (zero-worm array); with LEVELS > 1 the block
// counts are added by accumulators of L links, level by level, so that the
// tree has LEVELS levels in all and N = N1 * L**(LEVELS-1). The stored
// winner count nW enters at the top: as the worm's entry path of the single
// 1-counter when LEVELS = 1, or as the chain input of the top accumulator.
//
// In tie phase (tie = 1) the level tie_lvl being resolved also receives nW
// as its chain input (or worm entry path), so that its per-child flags give
// the k/(k+1) boundary directly. The tree exports, for every level v >= 1,
// per-input copies of the full/boundary flags of the level-(v-1) block each
// input belongs to, plus the boundary block's base count; for level 0 it
// exports the 1-counters' per-row selections.
// Tree shape and the nW entry point follow the document; the tie-phase
// outputs are this design's own. Purely combinational.
module kwta_winner_counter
  import kwta_pkg::*;
#(
  parameter int unsigned K      = 5,
  parameter int unsigned N1     = 16,
  parameter int unsigned L      = 8,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned N     = N1 * ipow(L, LEVELS - 1),
  localparam int unsigned NB    = N / N1,
  localparam int unsigned NS    = cnt_lines(K),
  localparam int unsigned LVW   = $clog2(LEVELS + 1)
) (
  input  logic [N-1:0]   t,
  input  logic [NS-1:0]  nw,
  input  logic           tie,
  input  logic [LVW-1:0] tie_lvl,
  output logic [NS-1:0]  det,
  output logic [N-1:0]   sel,                // level 0: worm selections
  output logic [N-1:0]   lv_full [LEVELS],   // level v>=1: block fully wins
  output logic [N-1:0]   lv_keep [LEVELS],   // level v>=1: block holds boundary
  output logic [NS-1:0]  lv_base [LEVELS],   // level v>=1: count before boundary
  output logic           lv_bnd  [LEVELS]    // level v>=1: a boundary exists
);
  // One count array per level (separate variables, so that no tool sees a
  // loop through a shared array).
  for (genvar v = 0; v < LEVELS; v++) begin : g_cnt
    logic [NS-1:0] cnt [NB];
  end
  logic [NS-1:0] oc_start;

  assign oc_start = (LEVELS == 1 || (tie && tie_lvl == '0)) ? nw : '0;

  // Level 0: the 1-counters.
  for (genvar b = 0; b < NB; b++) begin : g_oc
    kwta_one_counter #(.K(K), .N1(N1)) u_oc (
      .t     (t[b*N1 +: N1]),
      .start (oc_start),
      .count (g_cnt[0].cnt[b]),
      .sel   (sel[b*N1 +: N1])
    );
  end
  assign lv_full[0] = '0;
  assign lv_keep[0] = '0;
  assign lv_base[0] = '0;
  assign lv_bnd[0]  = 1'b0;

  // Levels 1..LEVELS-1: accumulators.
  for (genvar v = 1; v < LEVELS; v++) begin : g_lv
    localparam int unsigned NODES = NB / ipow(L, v);
    localparam int unsigned GS    = N1 * ipow(L, v - 1);  // inputs per child
    logic [NS-1:0]    chain;
    logic [NODES-1:0] hb;
    logic [NS-1:0]    bs [NODES];

    assign chain = (v == LEVELS - 1 || (tie && tie_lvl == LVW'(v))) ? nw : '0;

    for (genvar j = 0; j < NODES; j++) begin : g_node
      logic [NS-1:0] ch [L];
      logic [L-1:0]  f, bd;
      for (genvar c = 0; c < L; c++) begin : g_ch
        assign ch[c] = g_cnt[v-1].cnt[j*L + c];
        assign lv_full[v][(j*L + c)*GS +: GS] = {GS{f[c]}};
        assign lv_keep[v][(j*L + c)*GS +: GS] = {GS{bd[c]}};
      end
      kwta_accumulator #(.K(K), .L(L)) u_acc (
        .child    (ch),
        .chain_in (chain),
        .sum      (g_cnt[v].cnt[j]),
        .full     (f),
        .bnd      (bd),
        .has_bnd  (hb[j]),
        .base     (bs[j])
      );
    end
    for (genvar j = NODES; j < NB; j++) begin : g_unused
      assign g_cnt[v].cnt[j] = '0;
    end

    // Only one block of a level can hold competitors during tie breaking,
    // so the boundary bases of the level can simply be ORed.
    always_comb begin
      lv_base[v] = '0;
      for (int j = 0; j < int'(NODES); j++)
        if (hb[j]) lv_base[v] = lv_base[v] | bs[j];
      lv_bnd[v] = |hb;
    end
  end

  assign det = g_cnt[LEVELS-1].cnt[0];

endmodule
