// tb_kwta_cg: checks the competition-state generator (N = 32) against a
// bit-vector model: after start every input competes; T = C AND (registered
// D OR M); with upd the state becomes C XOR T when ltk is set and T
// otherwise, masked by keep; without upd C holds.
module tb_kwta_cg;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, m = 0, ltk = 0, upd = 0;
  logic [N-1:0] d = '0, keep = '1, c, t, mc, md;
  always #5 clk = ~clk;

  kwta_cg #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .d(d), .m(m), .ltk(ltk), .upd(upd),
    .keep(keep), .c(c), .t(t));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      logic [N-1:0] et;
      start = (it % 50 == 0);
      d     = $urandom;
      m     = ($urandom % 6 == 0);
      ltk   = $urandom % 2;
      upd   = ($urandom % 8 != 0);
      keep  = ($urandom % 5 == 0) ? N'($urandom) : '1;
      @(posedge clk);
      // model: state before this edge
      if (it > 0) begin
        et = mc & (md | {N{m}});
        checks++;
        if (t !== et) begin failures++; $display("it %0d: t %h expected %h", it, t, et); end
        if (start)    mc = '1;
        else if (upd) mc = (ltk ? (mc ^ et) : et) & keep;
      end else mc = '1;
      md = d;
      @(negedge clk);
      checks++;
      if (c !== mc) begin failures++; $display("it %0d: c %h expected %h", it, c, mc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
