// tb_kwta_top: end-to-end test of the kWTA engine in three tree shapes
// (single level, two levels, three levels) at reduced sizes, with K = 5 and
// also K = 3. Each configuration runs random searches checked against an
// independent reference (see kwta_top_harness). The test also requires that
// every mechanism occurred at least once: DET > K, DET < K, DET == K before
// the last bit, the tie phase, a tie settled above the 1-counters, and a tie
// settled in the 1-counters.
module tb_kwta_top;
  localparam int NH = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic fin [NH];
  int ck [NH], fl [NH], gt [NH], lt [NH], eq [NH], ti [NH], tu [NH], tl [NH];

  kwta_top_harness #(.M_BITS(6), .K(5), .N1(8), .L(1), .LEVELS(1), .TRIALS(300), .SEED(11)) h_sl (
    .clk(clk), .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .n_gt(gt[0]), .n_lt(lt[0]),
    .n_eq(eq[0]), .n_tie(ti[0]), .n_tie_upper(tu[0]), .n_tie_leaf(tl[0]), .max_cyc());
  kwta_top_harness #(.M_BITS(6), .K(5), .N1(4), .L(4), .LEVELS(2), .TRIALS(300), .SEED(22)) h_ml2 (
    .clk(clk), .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .n_gt(gt[1]), .n_lt(lt[1]),
    .n_eq(eq[1]), .n_tie(ti[1]), .n_tie_upper(tu[1]), .n_tie_leaf(tl[1]), .max_cyc());
  kwta_top_harness #(.M_BITS(6), .K(5), .N1(4), .L(4), .LEVELS(3), .TRIALS(300), .SEED(33)) h_ml3 (
    .clk(clk), .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .n_gt(gt[2]), .n_lt(lt[2]),
    .n_eq(eq[2]), .n_tie(ti[2]), .n_tie_upper(tu[2]), .n_tie_leaf(tl[2]), .max_cyc());
  kwta_top_harness #(.M_BITS(5), .K(3), .N1(2), .L(3), .LEVELS(3), .TRIALS(300), .SEED(44)) h_k3 (
    .clk(clk), .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .n_gt(gt[3]), .n_lt(lt[3]),
    .n_eq(eq[3]), .n_tie(ti[3]), .n_tie_upper(tu[3]), .n_tie_leaf(tl[3]), .max_cyc());

  int checks = 0, failures = 0;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never occurred: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int h = 0; h < NH; h++) begin
      checks += ck[h];
      failures += fl[h];
    end
    need("DET > K (C <= T)", gt[0] + gt[1] + gt[2] + gt[3]);
    need("DET < K (LTK)", lt[0] + lt[1] + lt[2] + lt[3]);
    need("DET == K (early finish)", eq[0] + eq[1] + eq[2] + eq[3]);
    need("tie phase, single level", ti[0]);
    need("tie phase, multi level", ti[1] + ti[2] + ti[3]);
    need("tie settled above leaves", tu[1] + tu[2] + tu[3]);
    need("tie settled in 1-counters", tl[0] + tl[1] + tl[2] + tl[3]);
    need("tie settled at level 0, 3 lv", tl[2]);
    need("tie settled above, 3 lv", tu[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
