// tb_kwta_wd: tests the winner decision (K = 5, N1 = 4, L = 4, LEVELS = 2,
// 16 inputs, 5-bit data) with the counter and competition-state generator
// replaced by plain behavioural code. For random data sets it checks, in
// every bit cycle, ltk and finish against DET computed here from integers,
// and at the end the winner flags against the K largest values (lowest
// index first among equals) and done.
module tb_kwta_wd;
  localparam int K = 5, N1 = 4, L = 4, LV = 2, N = 16, MB = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy = 0, m = 0;
  logic [1:0]   tie_lvl = '0;
  logic [N-1:0] t, c, keep, w;
  logic         ltk, finish, done;
  logic [MB-1:0] vals [N];
  always #5 clk = ~clk;

  kwta_wd #(.K(K), .N1(N1), .L(L), .LEVELS(LV)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .m(m), .tie_lvl(tie_lvl),
    .t(t), .c(c), .ltk(ltk), .finish(finish), .keep(keep), .w(w), .done(done));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%t: %s", $time, what); end
  endtask

  initial begin
    int nw, nt, cyc, rank;
    logic [N-1:0] ew, bits, k_s;
    logic f_s, l_s;
    logic [MB-1:0] pool [3];
    c = '1; t = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int tr = 0; tr < 400; tr++) begin
      for (int p = 0; p < 3; p++) pool[p] = MB'($urandom);
      for (int i = 0; i < N; i++) vals[i] = (tr % 2) ? pool[$urandom % 3] : MB'($urandom);
      for (int i = 0; i < N; i++) begin
        rank = 0;
        for (int j = 0; j < N; j++)
          if (vals[j] > vals[i] || (vals[j] == vals[i] && j < i)) rank++;
        ew[i] = rank < K;
      end
      start = 1;
      @(negedge clk);
      start = 0; busy = 1; c = '1; nw = 0; cyc = 0;
      forever begin
        m = (cyc >= MB);
        tie_lvl = m ? 2'(LV - 1 - (cyc - MB)) : '0;
        for (int i = 0; i < N; i++) bits[i] = m ? 1'b1 : vals[i][MB-1-cyc];
        t = c & bits;
        #1;
        f_s = finish; l_s = ltk; k_s = keep;
        if (!m) begin
          nt = $countones(t);
          chk(ltk == (nt + nw < K), "ltk");
          chk(finish == (nt + nw == K), "finish in bit cycle");
          if (nt + nw < K) nw = nt + nw;
        end
        @(negedge clk);
        if (f_s) break;
        c = (l_s ? (c ^ t) : t) & k_s;
        cyc++;
        chk(cyc <= MB + LV, "runs too long");
        if (cyc > MB + LV) break;
      end
      busy = 0; m = 0;
      chk(done, "done");
      chk(w === ew, "winners");
      if (w !== ew) $display("trial %0d: w=%h expected %h", tr, w, ew);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
