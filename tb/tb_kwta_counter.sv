// tb_kwta_counter: checks the cycle counter (M_BITS = 6, LEVELS = 3): busy
// rises after start, M stays low for exactly M_BITS busy cycles, tie_lvl
// then counts down LEVELS-1..0, finish stops the counter, and a new start
// restarts it.
module tb_kwta_counter;
  localparam int MB = 6, LV = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, finish = 0;
  logic busy, m;
  logic [1:0] tie_lvl;
  always #5 clk = ~clk;

  kwta_counter #(.M_BITS(MB), .LEVELS(LV)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .finish(finish), .busy(busy), .m(m), .tie_lvl(tie_lvl));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!busy && !m, "idle after reset");
    for (int run = 0; run < LV + 1; run++) begin
      // run r finishes in the tie cycle of level LV-1-r (run LV: in a bit cycle)
      int stop_at;
      stop_at = (run < LV) ? MB + run : 2;
      start = 1;
      @(negedge clk);
      start = 0;
      for (int c = 0; ; c++) begin
        chk(busy, "busy during search");
        chk(m == (c >= MB), "M timing");
        if (c >= MB) chk(int'(tie_lvl) == LV - 1 - (c - MB), "tie level");
        if (c == stop_at) begin
          finish = 1;
          @(negedge clk);
          finish = 0;
          break;
        end
        @(negedge clk);
      end
      chk(!busy && !m, "stopped after finish");
      repeat (2) @(negedge clk);
      chk(!busy, "stays stopped");
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
