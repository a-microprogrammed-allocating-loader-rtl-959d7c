// loader_datapath_tb: self-checking test of the loader's registers and micro-operations.
//
// The test plays the sequencer: it applies one control word at a time for one
// control-memory cycle (phases P(0), P(1), P(2), one clock each) and the
// main-memory ring value, and plays the associative memory by answering the
// match-read with a chosen word. It follows the first steps of the allocation
// of a segment (initial set-up, count down, match-read, relabelling, page
// count, match-write, end mark), then the loading steps (set-up, line count,
// end-of-page read of the next page, protection and end tests, NI(PA) <- D(Y))
// and one main-memory cycle (AR <- NI, B <- MBUS, M(AR) <- B), checking every
// register the words change against values worked out by hand.
module loader_datapath_tb;
  import loader_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, p0, p1, p2, sta0, sup_we, mbus_take, mm_we, am_mw, am_busy, am_hit;
  logic la_is_127, dy_is_star, dsn_eq_csn, nspn_zero;
  cword_t f;
  logic [2:0] mc;
  logic [PA_W-1:0] sup_fpa, fpa_q, pc_q;
  logic [SN_W-1:0] sup_nsn, csn_q;
  logic [NSPN_W-1:0] sup_nspn, nspn_q;
  logic [WORD_W-1:0] mbus, mm_wdata;
  logic [MA_W-1:0] mm_addr;
  am_word_t am_arg, am_mask, am_wdata, am_rdata;
  maddr_t ni_q;
  int checks = 0, failures = 0;
  int n_mw = 0, n_take = 0, n_we = 0;

  loader_datapath dut (.*);

  always @(posedge clk) begin
    if (am_mw) n_mw++;
    if (mbus_take) n_take++;
    if (mm_we) n_we++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic am_word_t mk(input int x, y, z, sn, s);
    return '{x: 8'(x), y: 8'(y), z: 8'(z), sn: 5'(sn), s: 3'(s)};
  endfunction

  // one control-memory cycle with word w and ring value m
  task automatic step(input cword_t w, input logic [2:0] m = 3'b000);
    @(negedge clk);
    f = w; mc = m;
    p0 = 1; p1 = 0; p2 = 0;
    @(negedge clk);
    p0 = 0; p1 = 1;
    @(negedge clk);
    p1 = 0; p2 = 1;
    @(negedge clk);
    p2 = 0;
    f = '0; mc = 3'b000;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cword_t w;
    rst = 1; p0 = 0; p1 = 0; p2 = 0; sta0 = 0; sup_we = 0; f = '0; mc = '0;
    sup_fpa = 0; sup_nsn = 0; sup_nspn = 0; mbus = '0; am_rdata = '0; am_hit = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    sup_we = 1; sup_fpa = 8'd56; sup_nsn = 5'd3; sup_nspn = 5'd2;
    @(negedge clk);
    sup_we = 0;
    check(fpa_q == 8'd56 && nspn_q == 5'd2, "supervisor set-up");

    // initialisation
    w = '0; w.ka = 2'b01; w.k_alloc = 1; w.pc_clr = 1; w.kn = 2'b01; w.csn_nsn = 1;
    step(w);
    check(am_arg == mk(56, 0, 0, 9, 4), "A <- FPA-0-0-9-4");
    check(am_mask == mk(255, 0, 0, 31, 7), "K <- 255-0-0-31-7");
    check(pc_q == 8'd0 && ni_q == '{pa: 8'd56, la: 7'd0} && csn_q == 5'd3, "PC, NI, CSN set up");

    // W: countdown, A(X) <- FPA, MR
    w = '0; w.ka = 2'b10; w.nspn_dec = 1; w.mr = 1;
    step(w);
    check(nspn_q == 5'd1 && !nspn_zero, "NSPN counted down to 1");
    check(am_busy, "match-read requested");
    // next word: the match-read happens in its P(0)
    am_rdata = mk(56, 34, 0, 9, 4); am_hit = 1;
    w = '0; w.fpa_dy = 1; w.d_new = 1;
    step(w);
    am_hit = 0;
    check(!am_busy, "request cleared");
    check(fpa_q == 8'd34, "FPA <- D(Y)");
    check(am_wdata == mk(56, 34, 0, 3, 0), "D(Z,SN,S) <- PC-NSN-0");
    w = '0; w.mw = 1; w.pc_inc = 1;
    step(w);
    check(pc_q == 8'd1, "PC counted up");
    w = '0; w.ka = 2'b10; w.nspn_dec = 1; w.mr = 1;
    step(w);
    check(n_mw == 1, "one match-write strobe");
    check(am_arg.x == 8'd34 && nspn_zero, "A(X) <- FPA and NSPN reached 0");
    am_rdata = mk(34, 103, 0, 9, 4); am_hit = 1;
    w = '0; w.fpa_dy = 1; w.d_new = 1;
    step(w);
    am_hit = 0;
    check(fpa_q == 8'd103 && am_wdata == mk(34, 103, 1, 3, 0), "second page relabelled");
    w = '0; w.dy_star = 1; w.mw = 1;
    step(w);
    check(am_wdata.y == STAR && dy_is_star, "D(Y) <- *");
    // loading set-up
    w = '0; w.ka = 2'b11; w.k_load = 1;
    step(w);
    check(n_mw == 2, "second match-write strobe");
    check(am_arg == mk(34, 0, 0, 9, 0) && am_mask == mk(255, 0, 0, 0, 7), "A(S) <- 0, K <- 255-0-0-0-7");

    // loading: line count to 127
    w = '0; w.t_la127 = 1; w.mr_sta0 = 1;
    sta0 = 1;
    step(w);
    check(!la_is_127 && am_arg.x == 8'd34 && !am_busy, "line 0: no read");
    w = '0; w.kn = 2'b10;
    for (int i = 0; i < 127; i++) step(w);
    check(ni_q == '{pa: 8'd56, la: 7'd127} && la_is_127, "line counted to 127");
    w = '0; w.t_la127 = 1; w.mr_sta0 = 1;
    sta0 = 0;
    step(w);
    check(am_arg.x == 8'd56 && am_busy, "line 127: A(X) <- NI(PA), MR");
    am_rdata = mk(56, 34, 0, 3, 0); am_hit = 1;
    w = '0; w.t_sn = 1;
    step(w);
    am_hit = 0;
    check(dsn_eq_csn && !dy_is_star, "segment number agrees, not the last page");
    w = '0; w.t_dy = 1;
    step(w);
    check(ni_q.pa == 8'd34, "NI(PA) <- D(Y)");
    w = '0; w.kn = 2'b10;
    step(w);
    check(ni_q == '{pa: 8'd34, la: 7'd0}, "line address wraps to 0");
    // a read that finds nothing leaves D alone
    w = '0; w.mr = 1;
    step(w);
    am_rdata = mk(1, 2, 3, 4, 5); am_hit = 0;
    step('0);
    check(am_wdata == mk(56, 34, 0, 3, 0), "missed read keeps D");
    // F(12) and KN=11
    w = '0; w.ax_nipa = 1; w.kn = 2'b11;
    step(w);
    check(am_arg.x == 8'd34 && ni_q.pa == 8'd34, "A(X) <- NI(PA), NI(PA) <- D(Y)");
    w = '0; w.kn = 2'b10;
    step(w);
    // main-memory cycle
    mbus = 48'h1234_5678_9ABC;
    step('0, 3'b100);
    check(mm_addr == {8'd34, 7'd1}, "AR <- NI");
    mbus = 48'h1234_5678_9ABC;
    step('0, 3'b010);
    mbus = 48'h0;
    check(mm_wdata == 48'h1234_5678_9ABC && n_take == 1, "B <- MBUS");
    check(n_we == 0, "no write before MC(2)");
    step('0, 3'b001);
    check(n_we == 1 && mm_addr == {8'd34, 7'd1}, "M(AR) <- B in MC(2)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
