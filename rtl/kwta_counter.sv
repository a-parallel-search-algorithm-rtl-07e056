// kwta_counter: cycle counter of the kWTA engine.
//
// A START pulse clears the counter and marks the engine busy; from then on
// the counter advances once per clock until the winner decision reports
// that the search is finished. The first M_BITS counted cycles are the bit
// cycles (bit M_BITS-1, the MSB, first). When all bits have been examined
// the counter raises M; the following LEVELS cycles are the tie-breaking
// cycles, one per level of the counting tree, and tie_lvl names the tree
// level being resolved (LEVELS-1 = top first, 0 = 1-counters last).
//
// Interface: start (1-cycle pulse, also restarts a running search), finish
// (from the winner decision, ends the search), busy, m (tie phase),
// tie_lvl. Timing: busy rises the cycle after start; the c-th busy cycle
// (c = 0 first) processes bit M_BITS-1-c.
// From the document: a counter reset by START and advancing every cycle,
// producing M. The busy flag and the tie-level output are this design's own.
module kwta_counter #(
  parameter int unsigned M_BITS = 32,  // data width m
  parameter int unsigned LEVELS = 3    // levels h of the counting tree
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         finish,
  output logic                         busy,
  output logic                         m,
  output logic [$clog2(LEVELS+1)-1:0]  tie_lvl
);
  localparam int unsigned CNTW = $clog2(M_BITS + LEVELS + 1);
  localparam int unsigned LVW  = $clog2(LEVELS + 1);

  logic [CNTW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      busy  <= 1'b0;
    end else if (start) begin
      count <= '0;
      busy  <= 1'b1;
    end else if (busy) begin
      if (finish) busy <= 1'b0;
      else        count <= count + 1'b1;
    end
  end

  always_comb begin
    m       = busy && (count >= CNTW'(M_BITS));
    tie_lvl = '0;
    for (int unsigned v = 0; v < LEVELS; v++)
      if (m && count == CNTW'(M_BITS + LEVELS - 1 - v)) tie_lvl = LVW'(v);
  end

endmodule
