// tb_kwta_top_full: the kWTA engine at its default size (1024 inputs of
// 32 bits, K = 5, tree 16 x 8 x 8) through four complete searches:
//   0: all values equal      - ties to the last level, exactly 32+3 cycles
//   1: random 32-bit values  - finishes early, in the bit cycles
//   2: values from 3 levels  - ties resolved inside the tree
//   3: six equal maxima, one at a high index - lowest five indices win
// Winners are checked against the K largest values (lowest index first
// among equals), the cycle count against M_BITS + LEVELS.
module tb_kwta_top_full;
  localparam int N = 1024, MB = 32, K = 5, LV = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [N-1:0] d, w;
  logic [MB-1:0] vals [N];
  always #5 clk = ~clk;

  kwta_top dut (.clk(clk), .rst_n(rst_n), .start(start), .d(d), .busy(busy), .done(done), .w(w));

  function automatic logic [N-1:0] slice(input int b);
    logic [N-1:0] s;
    for (int i = 0; i < N; i++) s[i] = (b >= 0) ? vals[i][b] : 1'b0;
    return s;
  endfunction

  // Expected winners: sort-free selection of the K largest, lowest index
  // first among equal values.
  function automatic logic [N-1:0] ref_winners();
    logic [N-1:0] r;
    r = '0;
    for (int n = 0; n < K; n++) begin
      int best;
      best = -1;
      for (int i = 0; i < N; i++)
        if (!r[i] && (best < 0 || vals[i] > vals[best])) best = i;
      r[best] = 1'b1;
    end
    return r;
  endfunction

  initial begin
    logic [N-1:0] ew;
    logic [MB-1:0] pool [3];
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < 4; op++) begin
      for (int p = 0; p < 3; p++) pool[p] = MB'($urandom);
      for (int i = 0; i < N; i++)
        case (op)
          0: vals[i] = pool[0];
          1: vals[i] = MB'($urandom);
          2: vals[i] = pool[$urandom % 3];
          default: vals[i] = (i % 200 == 7) ? 32'hFFFF_0000 : MB'($urandom % 32'hFFFF_0000);
        endcase
      ew = ref_winners();
      start = 1; d = slice(MB - 1);
      @(negedge clk);
      start = 0; cyc = 1; d = slice(MB - 2);
      while (!done && cyc < MB + LV + 5) begin
        @(negedge clk);
        cyc++;
        d = slice(MB - 1 - cyc);
      end
      $display("search %0d: %0d cycles, %0d winners", op, cyc - 1, $countones(w));
      checks++;
      if (!done || w !== ew) begin failures++; $display("search %0d: wrong winners", op); end
      checks++;
      if (cyc - 1 > MB + LV) begin failures++; $display("search %0d: too slow", op); end
      if (op == 0) begin
        checks++;
        if (cyc - 1 != MB + LV) begin failures++; $display("all-equal search not m+h cycles"); end
      end
      if (op == 1) begin
        checks++;
        if (cyc - 1 >= MB) begin failures++; $display("random search did not finish early"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
