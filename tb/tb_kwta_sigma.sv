// tb_kwta_sigma: exhaustive test of the Sigma-circuit for K = 5 and K = 7
// (k+1 a power of two): every pair of count bundles, including overflowed
// ones, against the saturating sum computed with plain integers.
module tb_kwta_sigma;
  int checks = 0, failures = 0;

  logic [3:0] a5, b5, y5;
  logic [3:0] a7, b7, y7;
  kwta_sigma #(.K(5)) u5 (.a(a5), .b(b5), .y(y5));
  kwta_sigma #(.K(7)) u7 (.a(a7), .b(b7), .y(y7));

  // Value of an operand: 0..k, or k+1 meaning "more than k".
  function automatic logic [3:0] enc(input int v, input int k);
    return (v > k) ? 4'b1000 : 4'(v);
  endfunction

  initial begin
    for (int k = 5; k <= 7; k += 2)
      for (int x = 0; x <= k + 1; x++)
        for (int z = 0; z <= k + 1; z++) begin
          logic [3:0] exp_y, got;
          exp_y = enc(x + z, k);
          if (k == 5) begin a5 = enc(x, 5); b5 = enc(z, 5); #1 got = y5; end
          else        begin a7 = enc(x, 7); b7 = enc(z, 7); #1 got = y7; end
          checks++;
          if (got !== exp_y) begin
            failures++;
            $display("k=%0d %0d+%0d: got %b expected %b", k, x, z, got, exp_y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
