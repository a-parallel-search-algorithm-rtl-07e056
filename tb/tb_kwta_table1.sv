// tb_kwta_table1: runs the engine in every tree shape of the published
// clock-period table for k = 5: single-level trees of 8..4096 inputs,
// two-level trees N1 x L and three-level trees N1 x L x L from 64 to 4096
// inputs, all with 32-bit data; and one k = 20 run on 1024 inputs, the
// winner count of the analog circuit the engine was compared with. Each
// shape performs a few random searches (random, few-valued, all-equal and
// sparse data) checked against the reference model of kwta_top_harness,
// and must never need more than 32 + LEVELS cycles. The all-equal searches
// reach that bound exactly.
module tb_kwta_table1;
  localparam int NH = 24;
  localparam string NAME [NH] = '{
    "8 inputs, 1-level 8",
    "16 inputs, 1-level 16",
    "32 inputs, 1-level 32",
    "64 inputs, 1-level 64",
    "128 inputs, 1-level 128",
    "64 inputs, 2-level 16x4",
    "128 inputs, 2-level 16x8",
    "256 inputs, 2-level 32x8",
    "512 inputs, 2-level 64x8",
    "1024 inputs, 2-level 64x16",
    "2048 inputs, 2-level 128x16",
    "4096 inputs, 2-level 128x32",
    "128 inputs, 3-level 8x4x4",
    "256 inputs, 3-level 16x4x4",
    "512 inputs, 3-level 32x4x4",
    "1024 inputs, 3-level 16x8x8",
    "2048 inputs, 3-level 32x8x8",
    "4096 inputs, 3-level 64x8x8",
    "256 inputs, 1-level 256",
    "512 inputs, 1-level 512",
    "1024 inputs, 1-level 1024",
    "2048 inputs, 1-level 2048",
    "4096 inputs, 1-level 4096",
    "1024 inputs, k=20, 16x8x8"
  };
  localparam int LVS [NH] = '{1, 1, 1, 1, 1, 2, 2, 2, 2, 2, 2, 2, 3, 3, 3, 3, 3, 3, 1, 1, 1, 1, 1, 3};
  logic clk = 0;
  always #5 clk = ~clk;

  logic fin [NH];
  int ck [NH], fl [NH], mx [NH];

  kwta_top_harness #(.M_BITS(32), .K(5), .N1(8), .L(1), .LEVELS(1), .TRIALS(24), .SEED(100)) h0 (
    .clk(clk), .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[0]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(16), .L(1), .LEVELS(1), .TRIALS(24), .SEED(101)) h1 (
    .clk(clk), .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[1]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(32), .L(1), .LEVELS(1), .TRIALS(24), .SEED(102)) h2 (
    .clk(clk), .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[2]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(64), .L(1), .LEVELS(1), .TRIALS(24), .SEED(103)) h3 (
    .clk(clk), .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[3]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(128), .L(1), .LEVELS(1), .TRIALS(24), .SEED(104)) h4 (
    .clk(clk), .finished(fin[4]), .checks(ck[4]), .failures(fl[4]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[4]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(16), .L(4), .LEVELS(2), .TRIALS(24), .SEED(105)) h5 (
    .clk(clk), .finished(fin[5]), .checks(ck[5]), .failures(fl[5]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[5]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(16), .L(8), .LEVELS(2), .TRIALS(24), .SEED(106)) h6 (
    .clk(clk), .finished(fin[6]), .checks(ck[6]), .failures(fl[6]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[6]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(32), .L(8), .LEVELS(2), .TRIALS(24), .SEED(107)) h7 (
    .clk(clk), .finished(fin[7]), .checks(ck[7]), .failures(fl[7]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[7]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(64), .L(8), .LEVELS(2), .TRIALS(12), .SEED(108)) h8 (
    .clk(clk), .finished(fin[8]), .checks(ck[8]), .failures(fl[8]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[8]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(64), .L(16), .LEVELS(2), .TRIALS(12), .SEED(109)) h9 (
    .clk(clk), .finished(fin[9]), .checks(ck[9]), .failures(fl[9]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[9]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(128), .L(16), .LEVELS(2), .TRIALS(4), .SEED(110)) h10 (
    .clk(clk), .finished(fin[10]), .checks(ck[10]), .failures(fl[10]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[10]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(128), .L(32), .LEVELS(2), .TRIALS(4), .SEED(111)) h11 (
    .clk(clk), .finished(fin[11]), .checks(ck[11]), .failures(fl[11]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[11]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(8), .L(4), .LEVELS(3), .TRIALS(24), .SEED(112)) h12 (
    .clk(clk), .finished(fin[12]), .checks(ck[12]), .failures(fl[12]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[12]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(16), .L(4), .LEVELS(3), .TRIALS(24), .SEED(113)) h13 (
    .clk(clk), .finished(fin[13]), .checks(ck[13]), .failures(fl[13]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[13]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(32), .L(4), .LEVELS(3), .TRIALS(12), .SEED(114)) h14 (
    .clk(clk), .finished(fin[14]), .checks(ck[14]), .failures(fl[14]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[14]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(16), .L(8), .LEVELS(3), .TRIALS(12), .SEED(115)) h15 (
    .clk(clk), .finished(fin[15]), .checks(ck[15]), .failures(fl[15]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[15]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(32), .L(8), .LEVELS(3), .TRIALS(4), .SEED(116)) h16 (
    .clk(clk), .finished(fin[16]), .checks(ck[16]), .failures(fl[16]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[16]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(64), .L(8), .LEVELS(3), .TRIALS(4), .SEED(117)) h17 (
    .clk(clk), .finished(fin[17]), .checks(ck[17]), .failures(fl[17]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[17]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(256), .L(1), .LEVELS(1), .TRIALS(12), .SEED(118)) h18 (
    .clk(clk), .finished(fin[18]), .checks(ck[18]), .failures(fl[18]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[18]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(512), .L(1), .LEVELS(1), .TRIALS(12), .SEED(119)) h19 (
    .clk(clk), .finished(fin[19]), .checks(ck[19]), .failures(fl[19]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[19]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(1024), .L(1), .LEVELS(1), .TRIALS(12), .SEED(120)) h20 (
    .clk(clk), .finished(fin[20]), .checks(ck[20]), .failures(fl[20]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[20]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(2048), .L(1), .LEVELS(1), .TRIALS(4), .SEED(121)) h21 (
    .clk(clk), .finished(fin[21]), .checks(ck[21]), .failures(fl[21]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[21]));
  kwta_top_harness #(.M_BITS(32), .K(5), .N1(4096), .L(1), .LEVELS(1), .TRIALS(4), .SEED(122)) h22 (
    .clk(clk), .finished(fin[22]), .checks(ck[22]), .failures(fl[22]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[22]));
  kwta_top_harness #(.M_BITS(32), .K(20), .N1(16), .L(8), .LEVELS(3), .TRIALS(8), .SEED(123)) h23 (
    .clk(clk), .finished(fin[23]), .checks(ck[23]), .failures(fl[23]), .n_gt(), .n_lt(), .n_eq(),
    .n_tie(), .n_tie_upper(), .n_tie_leaf(), .max_cyc(mx[23]));

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(posedge clk);
    for (int h = 0; h < NH; h++) wait (fin[h]);
    for (int h = 0; h < NH; h++) begin
      checks += ck[h] + 1;
      failures += fl[h];
      // the all-equal search must take exactly 32 + LEVELS cycles
      if (mx[h] != 32 + LVS[h]) failures++;
      $display("%-28s longest search %0d cycles (bound %0d), failures %0d", NAME[h], mx[h], 32 + LVS[h], fl[h]);
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
