// tb_kwta_winner_counter: random test of the counting tree with K = 5,
// N1 = 4, L = 2, LEVELS = 3 (16 inputs). Checks DET = n(T) + nW saturated
// above K, the 1-counter selections (each block serves its lowest rows
// first, entering at nW in the level-0 tie cycle and at 0 otherwise), and
// for levels 1 and 2 (those in use) the full/boundary flags, boundary base and boundary
// presence, all computed from integer block counts.
module tb_kwta_winner_counter;
  localparam int K = 5, N1 = 4, L = 2, LV = 3, N = 16;
  int checks = 0, failures = 0;

  logic [N-1:0] t, sel;
  logic [3:0]   nw, det;
  logic         tie;
  logic [1:0]   tie_lvl;
  logic [N-1:0] lv_full [LV];
  logic [N-1:0] lv_keep [LV];
  logic [3:0]   lv_base [LV];
  logic         lv_bnd  [LV];

  kwta_winner_counter #(.K(K), .N1(N1), .L(L), .LEVELS(LV)) dut (
    .t(t), .nw(nw), .tie(tie), .tie_lvl(tie_lvl), .det(det), .sel(sel),
    .lv_full(lv_full), .lv_keep(lv_keep), .lv_base(lv_base), .lv_bnd(lv_bnd));

  function automatic logic [3:0] enc(input int v);
    return (v > K) ? 4'b1000 : 4'(v);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("t=%h nw=%0d tie=%0d lvl=%0d: %s", t, nw, tie, tie_lvl, what);
    end
  endtask

  initial begin
    for (int it = 0; it < 5000; it++) begin
      int nwi, off, s, prev, gs, b;
      logic [N-1:0] es, ef, ek;
      bit hb;
      logic [3:0] eb;
      nwi = $urandom % K;
      nw  = 4'(nwi);
      tie = $urandom % 2;
      tie_lvl = 2'($urandom % LV);
      case (it % 3)
        0: t = N'($urandom);
        1: t = N'($urandom) & N'($urandom);
        default: t = N'($urandom) & N'($urandom) & N'($urandom);
      endcase
      #1;
      if (!tie || tie_lvl == 2'(LV - 1))
        chk(det === enc($countones(t) + nwi), "det");
      // level 0
      off = (tie && tie_lvl == 0) ? nwi : 0;
      es = '0;
      for (int blk = 0; blk < N / N1; blk++) begin
        int need;
        need = K - off;
        for (int i = blk * N1; i < (blk + 1) * N1; i++)
          if (t[i] && need > 0) begin es[i] = 1; need--; end
      end
      chk(sel === es, "sel");
      // levels 1..LV-1; in a tie cycle the levels above the one being
      // resolved carry nW more than once and are not used
      for (int v = 1; v < LV; v++) if (!tie || v <= int'(tie_lvl)) begin
        gs  = N1 * ((v == 1) ? 1 : L);
        off = (v == LV - 1 || (tie && int'(tie_lvl) == v)) ? nwi : 0;
        ef = '0; ek = '0; hb = 0; eb = '0;
        for (int node = 0; node < N / (gs * L); node++) begin
          s = off;
          for (int c = 0; c < L; c++) begin
            int cnt;
            cnt = 0;
            b = node * L + c;
            for (int i = b * gs; i < (b + 1) * gs; i++) if (t[i]) cnt++;
            prev = s;
            s += cnt;
            for (int i = b * gs; i < (b + 1) * gs; i++) begin
              ef[i] = (s <= K);
              ek[i] = (prev < K) && (s > K);
            end
            if (prev < K && s > K) begin hb = 1; eb = eb | enc(prev); end
          end
        end
        chk(lv_full[v] === ef, "full");
        chk(lv_keep[v] === ek, "keep");
        chk(lv_bnd[v] === hb, "bnd");
        chk(lv_base[v] === eb, "base");
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
