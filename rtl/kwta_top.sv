// kwta_top: parallel k-winners-take-all search engine.
//
// Finds the K largest of N unsigned M_BITS-bit inputs by examining all
// inputs at once, one bit position per clock from the MSB down. Each input
// is a competitor, a winner or a loser; per bit, the competitors with a 1
// (top dogs) are counted and added to the winners found so far. If that
// total is below K the top dogs win and the underdogs keep competing, if it
// is above K the underdogs lose, and if it equals K the search ends. If all
// bits are used up with too many equal competitors left, the lowest-indexed
// ones are chosen. Counting is done by a tree of 1-counters (N1 inputs each)
// and accumulators (L links each), LEVELS levels deep, so
// N = N1 * L**(LEVELS-1); defaults: 16 x 8 x 8 = 1024 inputs, 32-bit data,
// K = 5.
//
// Interface: pulse start for one cycle together with the MSB bit-slice on d
// (bit i of d belongs to input i); present the next lower slice in each
// following cycle. done rises when w (one flag per input) holds exactly K
// winners; it stays until the next start. busy is high while searching.
// Timing: at most M_BITS + LEVELS cycles from the cycle after start to the
// cycle that finishes; done is seen one cycle later.
// Block structure (counter, competition-state generator, winner decision)
// follows the document; port naming and the start/busy protocol are this
// design's own.
module kwta_top
  import kwta_pkg::*;
#(
  parameter int unsigned M_BITS = 32,
  parameter int unsigned K      = 5,
  parameter int unsigned N1     = 16,
  parameter int unsigned L      = 8,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned N     = N1 * ipow(L, LEVELS - 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] d,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] w
);
  localparam int unsigned LVW = $clog2(LEVELS + 1);

  initial assert (N > K) else $error("kwta_top: N must exceed K");

  logic           m, ltk, finish;
  logic [LVW-1:0] tie_lvl;
  logic [N-1:0]   c, t, keep;

  kwta_counter #(.M_BITS(M_BITS), .LEVELS(LEVELS)) u_cnt (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .finish  (finish),
    .busy    (busy),
    .m       (m),
    .tie_lvl (tie_lvl)
  );

  kwta_cg #(.N(N)) u_cg (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .d     (d),
    .m     (m),
    .ltk   (ltk),
    .upd   (busy),
    .keep  (keep),
    .c     (c),
    .t     (t)
  );

  kwta_wd #(.K(K), .N1(N1), .L(L), .LEVELS(LEVELS)) u_wd (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .busy    (busy),
    .m       (m),
    .tie_lvl (tie_lvl),
    .t       (t),
    .c       (c),
    .ltk     (ltk),
    .finish  (finish),
    .keep    (keep),
    .w       (w),
    .done    (done)
  );

endmodule
