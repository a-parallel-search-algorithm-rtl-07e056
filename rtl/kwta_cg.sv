// kwta_cg: competition-state generator (CG) of the kWTA engine.
//
// One independent cell per input. Each cell holds the input's competitor
// state C (preset to 1 by START: every input starts as a competitor) and a
// register for the incoming data bit (cleared by reset). The bit-serial
// inputs arrive MSB first, one bit-slice per clock; the registered bit is
// combined with C to give the top-dog flag T = C AND (D OR M). During the
// tie phase M forces the data term to 1 so that T equals C.
//
// State update at the end of each active cycle (upd = 1):
//   ltk = 1 (n(T)+nW < k): C <= C XOR T  (the underdogs keep competing)
//   ltk = 0 (n(T)+nW > k): C <= T        (the underdogs lose)
// and the result is ANDed with keep, which the tie breaker of a multi-level
// tree uses to narrow C down to one branch (keep is all ones otherwise).
// Interface: d is sampled every clock, so the MSB slice is presented in the
// START cycle and slice j in the j-th cycle after it; t is combinational
// from registers.
// The update rule follows the document's algorithm; the keep mask and the
// exact placement of the data register are this design's own choices.
module kwta_cg #(
  parameter int unsigned N = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] d,     // current bit-slice, one bit per input
  input  logic         m,     // tie phase: all data bits consumed
  input  logic         ltk,   // n(T)+nW < k in this cycle
  input  logic         upd,   // update C at the end of this cycle
  input  logic [N-1:0] keep,  // competitors allowed to remain
  output logic [N-1:0] c,
  output logic [N-1:0] t
);
  logic [N-1:0] dreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c    <= '1;
      dreg <= '0;
    end else begin
      dreg <= d;
      if (start)    c <= '1;
      else if (upd) c <= (ltk ? (c ^ t) : t) & keep;
    end
  end

  assign t = c & (dreg | {N{m}});

endmodule
