// kwta_top_harness: drives one kwta_top configuration through TRIALS random
// searches and checks each against a reference model written directly from
// the algorithm: the expected winners are the K largest values with ties
// going to the lowest indices, and the expected cycle count is obtained by
// replaying the bit-serial search and the level-by-level tie resolution on
// plain integers. It also counts how often each mechanism of the engine
// occurred (DET above/below/equal to K, tie phase, tie ended above the
// 1-counters, tie ended in the 1-counters) and the longest search seen.
// Used by tb_kwta_top and tb_kwta_table1.
module kwta_top_harness #(
  parameter int unsigned M_BITS = 6,
  parameter int unsigned K      = 5,
  parameter int unsigned N1     = 4,
  parameter int unsigned L      = 4,
  parameter int unsigned LEVELS = 2,
  parameter int unsigned TRIALS = 200,
  parameter int unsigned SEED   = 1
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_gt,
  output int   n_lt,
  output int   n_eq,
  output int   n_tie,
  output int   n_tie_upper,
  output int   n_tie_leaf,
  output int   max_cyc
);
  localparam int unsigned N  = N1 * kwta_pkg::ipow(L, LEVELS - 1);
  localparam int unsigned NS = kwta_pkg::cnt_lines(K);

  logic         rst_n, start, busy, done;
  logic [N-1:0] d, w;
  logic [M_BITS-1:0] vals [N];

  kwta_top #(.M_BITS(M_BITS), .K(K), .N1(N1), .L(L), .LEVELS(LEVELS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .d(d), .busy(busy), .done(done), .w(w)
  );

  // Mechanism counters, sampled from the engine's internal decisions.
  always @(posedge clk) if (rst_n && busy) begin
    if (!dut.m) begin
      if (dut.u_wd.det[NS-1]) n_gt++;
      if (dut.ltk)            n_lt++;
      if (dut.finish)         n_eq++;
    end else begin
      n_tie++;
      if (dut.finish && dut.tie_lvl != '0) n_tie_upper++;
      if (dut.finish && dut.tie_lvl == '0) n_tie_leaf++;
    end
  end

  function automatic logic [N-1:0] slice(input int b);
    logic [N-1:0] s;
    for (int i = 0; i < N; i++) s[i] = (b >= 0) ? vals[i][b] : 1'b0;
    return s;
  endfunction

  // Reference: expected winners (K largest, lowest index first among equals).
  function automatic logic [N-1:0] ref_winners();
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      int rank = 0;
      for (int j = 0; j < N; j++)
        if (vals[j] > vals[i] || (vals[j] == vals[i] && j < i)) rank++;
      r[i] = (rank < int'(K));
    end
    return r;
  endfunction

  // Reference: number of search cycles.
  function automatic int ref_cycles();
    bit c [N];
    int nw = 0, cyc = 0;
    for (int i = 0; i < N; i++) c[i] = 1;
    for (int b = int'(M_BITS) - 1; b >= 0; b--) begin
      int nt = 0;
      cyc++;
      for (int i = 0; i < N; i++) if (c[i] && vals[i][b]) nt++;
      if (nt + nw <= int'(K)) begin
        if (nt + nw == int'(K)) return cyc;
        nw = nt + nw;
        for (int i = 0; i < N; i++) if (vals[i][b]) c[i] = 0;
      end else begin
        for (int i = 0; i < N; i++) if (!vals[i][b]) c[i] = 0;
      end
    end
    for (int v = int'(LEVELS) - 1; v >= 0; v--) begin
      int gs = int'(N1) * int'(kwta_pkg::ipow(L, (v > 0) ? v - 1 : 0));
      int s = nw, bgrp = -1;
      cyc++;
      if (v == 0) return cyc;
      for (int g = 0; g < int'(N) / gs; g++) begin
        int cg = 0;
        for (int i = g * gs; i < (g + 1) * gs; i++) if (c[i]) cg++;
        if (s + cg <= int'(K)) s += cg;
        else if (s < int'(K)) begin bgrp = g; break; end
      end
      if (bgrp < 0) return cyc;
      nw = s;
      for (int i = 0; i < N; i++) if (i / gs != bgrp) c[i] = 0;
    end
    return cyc;
  endfunction

  task automatic gen_values(input int mode);
    logic [M_BITS-1:0] pool [4];
    for (int p = 0; p < 4; p++) pool[p] = M_BITS'($urandom);
    for (int i = 0; i < N; i++)
      case (mode)
        0: vals[i] = M_BITS'($urandom);
        1: vals[i] = pool[$urandom % 3];
        2: vals[i] = pool[0];
        default: vals[i] = ($urandom % 8 == 0) ? M_BITS'($urandom) : '0;
      endcase
  endtask

  initial begin
    int exp_cyc, cyc;
    logic [N-1:0] exp_w;
    void'($urandom(SEED));
    finished = 0; checks = 0; failures = 0;
    n_gt = 0; n_lt = 0; n_eq = 0; n_tie = 0; n_tie_upper = 0; n_tie_leaf = 0; max_cyc = 0;
    rst_n = 0; start = 0; d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tr = 0; tr < int'(TRIALS); tr++) begin
      gen_values(tr % 4);
      exp_w   = ref_winners();
      exp_cyc = ref_cycles();
      @(negedge clk);
      start = 1; d = slice(int'(M_BITS) - 1);
      @(negedge clk);
      start = 0;
      cyc = 1;
      d = slice(int'(M_BITS) - 2);
      while (!done && cyc < int'(M_BITS + LEVELS) + 5) begin
        @(negedge clk);
        cyc++;
        d = slice(int'(M_BITS) - 1 - cyc);
      end
      // done is seen cyc edges after the start edge; the finishing busy
      // cycle is the one before.
      checks++;
      if (w !== exp_w || !done) begin
        failures++;
        if (failures < 10) $display("LEVELS=%0d trial %0d: w=%h expected %h", LEVELS, tr, w, exp_w);
      end
      checks++;
      if (cyc - 1 != exp_cyc) begin
        failures++;
        if (failures < 10) $display("LEVELS=%0d trial %0d: %0d cycles, expected %0d", LEVELS, tr, cyc - 1, exp_cyc);
      end
      if (cyc - 1 > max_cyc) max_cyc = cyc - 1;
      checks++;
      if (cyc - 1 > int'(M_BITS + LEVELS)) failures++;
      checks++;
      if ($countones(w) != int'(K)) failures++;
      // busy must drop with done
      checks++;
      if (busy) failures++;
    end
    finished = 1;
  end

endmodule
