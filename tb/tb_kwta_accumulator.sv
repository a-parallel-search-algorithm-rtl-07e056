// tb_kwta_accumulator: random test of an accumulator (K = 5, L = 8): the
// chain sum against a saturating integer sum, and the per-child full and
// boundary flags and the boundary base against their definitions computed
// from integer prefix sums.
module tb_kwta_accumulator;
  localparam int K = 5, L = 8;
  int checks = 0, failures = 0;

  logic [3:0] child [L];
  logic [3:0] chain_in, sum, base;
  logic [L-1:0] full, bnd;
  logic has_bnd;

  kwta_accumulator #(.K(K), .L(L)) dut (
    .child(child), .chain_in(chain_in), .sum(sum), .full(full), .bnd(bnd),
    .has_bnd(has_bnd), .base(base));

  function automatic logic [3:0] enc(input int v);
    return (v > K) ? 4'b1000 : 4'(v);
  endfunction

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int cv [L];
      int ci, s, prev, bidx;
      logic [L-1:0] ef, eb;
      ci = (it % 3 == 0) ? 0 : $urandom % (K + 2);
      chain_in = enc(ci);
      for (int c = 0; c < L; c++) begin
        cv[c] = ($urandom % 3 == 0) ? $urandom % (K + 2) : 0;
        child[c] = enc(cv[c]);
      end
      #1;
      s = ci; bidx = -1; ef = '0; eb = '0;
      for (int c = 0; c < L; c++) begin
        prev = s;
        s += cv[c];
        ef[c] = (s <= K);
        eb[c] = (prev < K) && (s > K);
        if (eb[c]) bidx = prev;
      end
      checks += 5;
      if (sum !== enc(s)) begin failures++; $display("sum %b expected %b", sum, enc(s)); end
      if (full !== ef) begin failures++; $display("full %b expected %b", full, ef); end
      if (bnd !== eb) begin failures++; $display("bnd %b expected %b", bnd, eb); end
      if (has_bnd !== (bidx >= 0)) failures++;
      if (base !== ((bidx >= 0) ? enc(bidx) : 4'b0)) begin failures++; $display("base %b", base); end
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
