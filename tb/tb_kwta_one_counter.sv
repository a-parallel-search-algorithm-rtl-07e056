// tb_kwta_one_counter: random test of the 1-counter (zero-worm array) with
// K = 5, N1 = 16: for random T vectors and every entry path 0..k (and an
// already-overflowed entry) the exit count must equal start + n(T)
// saturated above k, and the rows selected for tie breaking must be the
// lowest-indexed k-start ones of T.
module tb_kwta_one_counter;
  localparam int K = 5, N1 = 16;
  int checks = 0, failures = 0;

  logic [N1-1:0] t, sel;
  logic [3:0]    start, count;

  kwta_one_counter #(.K(K), .N1(N1)) dut (.t(t), .start(start), .count(count), .sel(sel));

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int st, n, need;
      logic [3:0] exp_c;
      logic [N1-1:0] exp_s;
      st = it % (K + 2);
      case ((it / 7) % 3)
        0: t = N1'($urandom);
        1: t = N1'($urandom) & N1'($urandom) & N1'($urandom);
        default: t = N1'(1) << ($urandom % N1);
      endcase
      start = (st > K) ? 4'b1000 : 4'(st);
      #1;
      n = $countones(t);
      exp_c = (st + n > K || st > K) ? 4'b1000 : 4'(st + n);
      need  = (st > K) ? 0 : K - st;
      exp_s = '0;
      for (int i = 0; i < N1; i++)
        if (t[i] && need > 0) begin exp_s[i] = 1'b1; need--; end
      checks += 2;
      if (count !== exp_c) begin
        failures++;
        $display("t=%h start=%0d: count %b expected %b", t, st, count, exp_c);
      end
      if (sel !== exp_s) begin
        failures++;
        $display("t=%h start=%0d: sel %h expected %h", t, st, sel, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
