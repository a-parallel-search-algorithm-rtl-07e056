// kwta_wd: winner decision (WD) part of the kWTA engine.
//
// Holds the winner registers W (set-only per input, cleared by START), the
// winner count nW and the DONE flag, and contains the counting tree and the
// tie breaker. In every bit cycle it forms DET = n(T) + nW and decides:
//   DET >  k: nothing is added; ltk = 0 so the generator keeps only T.
//   DET <  k: the top dogs T join W, nW <= DET, ltk = 1 so the generator
//             keeps the underdogs.
//   DET == k: the top dogs join W and the search finishes (finish = 1).
// In the tie phase (m = 1, T = C) the tie breaker adds winners and narrows
// the competitors one tree level per cycle until k winners are fixed.
// Interface: busy/m/tie_lvl come from the counter, t/c from the competition
// state generator; finish is combinational, done/w are registered and
// valid from the cycle after finish.
// The decision rule follows the document; the binary storage of nW (the
// document keeps it as a one-cold pattern in per-path flip-flops) is this
// design's choice.
module kwta_wd
  import kwta_pkg::*;
#(
  parameter int unsigned K      = 5,
  parameter int unsigned N1     = 16,
  parameter int unsigned L      = 8,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned N     = N1 * ipow(L, LEVELS - 1),
  localparam int unsigned NS    = cnt_lines(K),
  localparam int unsigned CW    = NS - 1,
  localparam int unsigned LVW   = $clog2(LEVELS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           busy,
  input  logic           m,
  input  logic [LVW-1:0] tie_lvl,
  input  logic [N-1:0]   t,
  input  logic [N-1:0]   c,
  output logic           ltk,
  output logic           finish,
  output logic [N-1:0]   keep,
  output logic [N-1:0]   w,
  output logic           done
);
  logic [NS-1:0] det, nw;
  logic [N-1:0]  sel;
  logic [N-1:0]  lv_full [LEVELS];
  logic [N-1:0]  lv_keep [LEVELS];
  logic [NS-1:0] lv_base [LEVELS];
  logic          lv_bnd  [LEVELS];
  logic [N-1:0]  win_set, tb_keep, w_set;
  logic [NS-1:0] nw_new;
  logic          tie_done, tie, bit_phase, det_le, det_eq;

  assign tie       = busy && m;
  assign bit_phase = busy && !m;

  kwta_winner_counter #(.K(K), .N1(N1), .L(L), .LEVELS(LEVELS)) u_wc (
    .t       (t),
    .nw      (nw),
    .tie     (tie),
    .tie_lvl (tie_lvl),
    .det     (det),
    .sel     (sel),
    .lv_full (lv_full),
    .lv_keep (lv_keep),
    .lv_base (lv_base),
    .lv_bnd  (lv_bnd)
  );

  kwta_tie_breaker #(.K(K), .N(N), .LEVELS(LEVELS)) u_tb (
    .tie      (tie),
    .tie_lvl  (tie_lvl),
    .c        (c),
    .sel      (sel),
    .lv_full  (lv_full),
    .lv_keep  (lv_keep),
    .lv_base  (lv_base),
    .lv_bnd   (lv_bnd),
    .win_set  (win_set),
    .keep     (tb_keep),
    .nw_new   (nw_new),
    .tie_done (tie_done)
  );

  always_comb begin
    det_le = !det[NS-1];
    det_eq = det_le && (det[CW-1:0] == CW'(K));
    ltk    = bit_phase && det_le && !det_eq;
    finish = (bit_phase && det_eq) || (tie && tie_done);
    keep   = tie ? tb_keep : '1;
    if (bit_phase) w_set = det_le ? t : '0;
    else           w_set = win_set;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w    <= '0;
      nw   <= '0;
      done <= 1'b0;
    end else if (start) begin
      w    <= '0;
      nw   <= '0;
      done <= 1'b0;
    end else if (busy) begin
      w <= w | w_set;
      if (bit_phase && det_le) nw <= det;
      else if (tie)            nw <= nw_new;
      if (finish) done <= 1'b1;
    end
  end

  // A finished search always holds exactly K winners.
  a_k_winners: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> ($countones(w) == K));

endmodule
