// tb_kwta_tie_breaker: random test of the tie breaker (K = 5, N = 16,
// LEVELS = 3): outside the tie phase it adds nothing and keeps every
// competitor; in the level-0 tie cycle it adds the selected competitors and
// ends; in a level-v cycle it adds the competitors of fully winning blocks,
// keeps the boundary block, takes the boundary base as the new winner count
// and ends only when no boundary block exists.
module tb_kwta_tie_breaker;
  localparam int K = 5, N = 16, LV = 3;
  int checks = 0, failures = 0;

  logic         tie, tie_done;
  logic [1:0]   tie_lvl;
  logic [N-1:0] c, sel, win_set, keep;
  logic [N-1:0] lv_full [LV];
  logic [N-1:0] lv_keep [LV];
  logic [3:0]   lv_base [LV];
  logic         lv_bnd  [LV];
  logic [3:0]   nw_new;

  kwta_tie_breaker #(.K(K), .N(N), .LEVELS(LV)) dut (
    .tie(tie), .tie_lvl(tie_lvl), .c(c), .sel(sel), .lv_full(lv_full), .lv_keep(lv_keep),
    .lv_base(lv_base), .lv_bnd(lv_bnd), .win_set(win_set), .keep(keep), .nw_new(nw_new),
    .tie_done(tie_done));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("tie=%0d lvl=%0d: %s", tie, tie_lvl, what); end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int v;
      tie = $urandom % 4 != 0;
      v = $urandom % LV;
      tie_lvl = 2'(v);
      c = N'($urandom); sel = N'($urandom);
      for (int l = 0; l < LV; l++) begin
        lv_full[l] = N'($urandom); lv_keep[l] = N'($urandom);
        lv_base[l] = 4'($urandom % K); lv_bnd[l] = $urandom % 2;
      end
      #1;
      if (!tie) begin
        chk(win_set === '0 && keep === '1 && !tie_done, "idle outputs");
      end else if (v == 0) begin
        chk(win_set === (sel & c), "leaf selection");
        chk(keep === '0, "leaf keep");
        chk(tie_done === 1'b1, "leaf done");
      end else begin
        chk(win_set === (c & lv_full[v]), "level winners");
        chk(keep === lv_keep[v], "level keep");
        chk(tie_done === !lv_bnd[v], "level done");
        if (lv_bnd[v]) chk(nw_new === lv_base[v], "new nW");
        else           chk(nw_new === 4'(K), "nW at end");
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
