// kwta_one_counter: 1-counter ("zero-worm" array) of the winner counter.
//
// The array has k+1 vertical paths p_0..p_k and one row per input T_i. A
// single marker (the worm) enters at the bottom on the path named by the
// start count and climbs row by row: where T_i = 0 it stays on its path,
// where T_i = 1 it moves one path to the right. If it moves right from p_k it
// leaves the array on the right edge, meaning the count exceeds k. The path
// it ends on at the top is start + n(T), saturated above k.
//
// Modelled here as a one-hot vector of k+2 positions (p_0..p_k plus
// "exited") shifted once per row that carries a 1; this is the logic
// function of the document's pass-transistor multiplexer array, not its
// circuit.
//
// For the tie breaker each row also reports sel_i = T_i AND (worm below p_k
// when it reaches row i): rows 0,1,.. are served first, so exactly the
// lowest-indexed k-start ones of T are selected.
// Interface: purely combinational. start and count are count bundles
// {overflow, binary count} of 1+ceil(log2(k+1)) lines.
module kwta_one_counter
  import kwta_pkg::*;
#(
  parameter int unsigned K  = 5,   // number of winners k
  parameter int unsigned N1 = 16,  // inputs per 1-counter block
  localparam int unsigned NS = cnt_lines(K),
  localparam int unsigned CW = NS - 1
) (
  input  logic [N1-1:0] t,
  input  logic [NS-1:0] start,  // worm entry path (nW or 0)
  output logic [NS-1:0] count,  // worm exit path: start + n(T), saturated
  output logic [N1-1:0] sel     // tie-break selection per row
);
  logic [K+1:0] worm [N1+1];    // worm position below row i (index N1 = top)

  always_comb begin
    worm[0] = '0;
    worm[0][K+1] = start[NS-1];
    for (int p = 0; p <= K; p++)
      worm[0][p] = !start[NS-1] && (start[CW-1:0] == CW'(p));
    for (int i = 0; i < N1; i++) begin
      sel[i] = t[i] && (|worm[i][K-1:0]);
      if (t[i]) worm[i+1] = {worm[i][K+1] | worm[i][K], worm[i][K-1:0], 1'b0};
      else      worm[i+1] = worm[i];
    end
    // Encode the exit position as a count bundle.
    count = '0;
    if (worm[N1][K+1]) count[NS-1] = 1'b1;
    else
      for (int p = 0; p <= K; p++)
        if (worm[N1][p]) count[CW-1:0] = CW'(p);
  end

endmodule
