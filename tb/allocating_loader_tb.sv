// allocating_loader_tb: end-to-end test of the allocating-loader at its default sizes.
//
// Run 1 allocates and loads a 600-word segment (5 pages) as segment 3 from an
// available segment 9 whose pages are linked 56-34-103-6-89-201-153-55. It
// checks the page map afterwards (pages 56..89 relabelled with orders 0..4,
// page 89 ending the segment, FPA = 201, PC = 4), every word stored in main
// memory at the address the page links give, and the timing: one word per
// main-memory cycle (9 clocks) within a page and 12 clocks for the first word
// of a new page. The dynamic address unit is then exercised on the loaded
// segment: line stepping, page crossing, end of segment, protection, operand
// mapping and a miss.
// Run 2 loads a 3-page segment while the host relabels the second page to
// another segment in the map: leaving that page, the loader must stop with a
// protection interrupt.
// Every mechanism (allocation step, end mark, page crossing, memory-cycle wait,
// return, interrupt, each address-unit outcome) is counted and must occur.
module allocating_loader_tb;
  import loader_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic sup_we, start;
  logic [PA_W-1:0] sup_fpa;
  logic [SN_W-1:0] sup_nsn;
  logic [NSPN_W-1:0] sup_nspn;
  logic halted, done, prot_int, waiting, am_multi;
  logic [7:0] h;
  logic [PA_W-1:0] fpa, pc;
  maddr_t ni;
  logic [SN_W-1:0] csn;
  logic [NSPN_W-1:0] nspn;
  logic [2:0] mc;
  logic [WORD_W-1:0] mbus;
  logic mbus_take;
  logic am_host_we;
  logic [8:0] am_host_idx;
  am_word_t am_host_wdata, am_host_rdata;
  logic [MA_W-1:0] mm_raddr;
  logic [WORD_W-1:0] mm_rdata;
  logic xl_req, xl_operand, xl_valid, xl_protect, xl_seg_end, xl_miss;
  maddr_t xl_addr, xl_addr_out;
  logic [SN_W-1:0] xl_csn;

  allocating_loader dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // backing store: word k of the segment
  function automatic logic [WORD_W-1:0] seg_word(input int run, input int k);
    return {8'(run), 8'hA5, 32'(k) * 32'd2654435761};
  endfunction

  int run_id = 1;
  int k = 0;
  int take_cyc [$];
  int n_wait = 0;
  int t_run = 0;
  logic halted_q = 1'b1;
  always @(posedge clk) begin
    halted_q <= halted;
    if (halted_q && !halted) t_run <= cyc;   // first clock of a run
  end
  assign mbus = seg_word(run_id, k);
  always @(posedge clk) begin
    if (mbus_take) begin
      k <= k + 1;
      take_cyc.push_back(cyc);
    end
    if (waiting && dut.u_ctl.phase == 2'd1) n_wait++;
  end

  function automatic am_word_t mk(input int x, y, z, sn, s);
    return '{x: 8'(x), y: 8'(y), z: 8'(z), sn: 5'(sn), s: 3'(s)};
  endfunction

  task automatic am_write(input int idx, input am_word_t w);
    @(negedge clk);
    am_host_we = 1'b1; am_host_idx = 9'(idx); am_host_wdata = w;
    @(negedge clk);
    am_host_we = 1'b0;
  endtask

  // find the map word whose X is page p and whose status is not 110
  function automatic am_word_t find_page(input int p);
    for (int i = 0; i < 512; i++)
      if (dut.u_am.mem[i].x == 8'(p) && dut.u_am.mem[i].s != ST_SEGREG &&
          dut.u_am.mem[i].s != ST_UNUSED)
        return dut.u_am.mem[i];
    return '0;
  endfunction

  task automatic run_loader(input int fpa_v, nsn_v, nspn_v);
    @(negedge clk);
    sup_we = 1'b1; sup_fpa = 8'(fpa_v); sup_nsn = 5'(nsn_v); sup_nspn = 5'(nspn_v);
    @(negedge clk);
    sup_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (6) @(negedge clk);
    while (!halted) @(negedge clk);
    repeat (9) @(negedge clk);   // let the last main-memory cycle finish
  endtask

  task automatic xlate(input bit op, input int pa, la, sn);
    @(negedge clk);
    xl_req = 1'b1; xl_operand = op; xl_addr = '{pa: 8'(pa), la: 7'(la)}; xl_csn = 5'(sn);
    @(negedge clk);
    xl_req = 1'b0;
    check(xl_valid, "address unit answers one clock after the request");
  endtask

  // mechanism counters
  int n_alloc_write = 0, n_star = 0, n_cross = 0, n_return = 0, n_int = 0;
  int n_seq_line = 0, n_seq_page = 0, n_seg_end = 0, n_protect = 0, n_operand = 0, n_miss = 0;

  int chain1 [8] = '{56, 34, 103, 6, 89, 201, 153, 55};

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    am_word_t w;
    int nwords, r, z, la, t0;
    rst = 1'b1; sup_we = 0; start = 0; sup_fpa = 0; sup_nsn = 0; sup_nspn = 0;
    am_host_we = 0; am_host_idx = 0; am_host_wdata = '0; mm_raddr = '0;
    xl_req = 0; xl_operand = 0; xl_addr = '0; xl_csn = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // ---------------- run 1: the 600-word example ----------------
    for (int i = 0; i < 8; i++)
      am_write(40 + 3 * i, mk(chain1[i], (i == 7) ? 255 : chain1[i+1], 0, 9, 4));
    am_write(7, mk(56, 0, 0, 9, 6));
    am_write(8, mk(0, 0, 0, 3, 6));
    check(halted && !done, "loader idle after reset");

    run_id = 1; k = 0; take_cyc.delete();
    run_loader(56, 3, 5);
    check(done && !prot_int && h == 8'd255, "run 1 ends at the return exit");
    if (done) n_return++;
    check(fpa == 8'd201, "FPA left at the first remaining available page (201)");
    check(pc == 8'd4, "page counter ends at 4");
    for (int i = 0; i < 8; i++) begin
      w = find_page(chain1[i]);
      if (i < 5) begin
        check(w.sn == 5'd3 && w.s == ST_LOADED && w.z == 8'(i),
              $sformatf("page %0d relabelled: sn=%0d s=%0d z=%0d", chain1[i], w.sn, w.s, w.z));
        if (i < 4) begin
          check(w.y == 8'(chain1[i+1]), $sformatf("page %0d keeps its link", chain1[i]));
          if (w.y == 8'(chain1[i+1]) && w.sn == 5'd3) n_alloc_write++;
        end else begin
          check(w.y == STAR, "last page of the new segment carries the end mark");
          if (w.y == STAR) n_star++;
        end
      end else begin
        check(w.sn == 5'd9 && w.s == ST_AVAILABLE, $sformatf("page %0d still available", chain1[i]));
      end
    end

    // loaded words: first word at line 1 of the first page, then contiguous
    nwords = 127 + 4 * 128;
    check(k == nwords, $sformatf("words taken from MBUS: %0d, expected %0d", k, nwords));
    for (int kk = 0; kk < nwords; kk++) begin
      r = kk + 1; z = r / 128; la = r % 128;
      mm_raddr = {8'(chain1[z]), 7'(la)};
      #1;
      check(mm_rdata == seg_word(1, kk), $sformatf("word %0d at page %0d line %0d", kk, chain1[z], la));
    end
    // allocation: word 0, three words per page, two for the last, then words
    // 4, 5, 6, 9, 6: 20 control-memory cycles counted from the first P(0) of the
    // run; the first word is taken in the P(0) after them, 3 * 20 = 60 clocks on
    check(take_cyc.size() > 0 && take_cyc[0] - t_run == 60,
          $sformatf("first word taken %0d clocks after the start", take_cyc.size() > 0 ? take_cyc[0] - t_run : -1));
    for (int i = 1; i < take_cyc.size(); i++) begin
      r = i + 1;
      if (r % 128 == 0) begin
        check(take_cyc[i] - take_cyc[i-1] == 12, $sformatf("page-crossing word %0d after %0d clocks", i, take_cyc[i] - take_cyc[i-1]));
        n_cross++;
      end else begin
        check(take_cyc[i] - take_cyc[i-1] == 9, $sformatf("word %0d after %0d clocks", i, take_cyc[i] - take_cyc[i-1]));
      end
    end

    // ---------------- dynamic address unit on segment 3 ----------------
    xlate(0, 56, 5, 3);
    check(xl_addr_out == '{pa: 8'd56, la: 7'd6} && !xl_protect && !xl_seg_end, "SEQ within a page");
    if (xl_addr_out.la == 7'd6) n_seq_line++;
    xlate(0, 34, 127, 3);
    check(xl_addr_out == '{pa: 8'd103, la: 7'd0} && !xl_protect && !xl_seg_end, "SEQ to next page");
    if (xl_addr_out.pa == 8'd103) n_seq_page++;
    xlate(0, 89, 127, 3);
    check(xl_seg_end && !xl_protect, "SEQ at the end of the segment");
    if (xl_seg_end) n_seg_end++;
    xlate(0, 6, 127, 4);
    check(xl_protect, "SEQ into a page of another segment raises protection");
    if (xl_protect) n_protect++;
    for (int zz = 0; zz < 5; zz++) begin
      xlate(1, zz, 77, 3);
      check(xl_addr_out == '{pa: 8'(chain1[zz]), la: 7'd77} && !xl_miss, $sformatf("operand page order %0d", zz));
      mm_raddr = xl_addr_out;
      #1;
      check(mm_rdata == seg_word(1, zz * 128 + 77 - 1), "operand word read through the mapped address");
      if (!xl_miss) n_operand++;
    end
    xlate(1, 5, 0, 3);
    check(xl_miss, "operand beyond the segment misses");
    if (xl_miss) n_miss++;

    // ---------------- run 2: protection interrupt ----------------
    // available segment now 201-153-55; relabel 153 to segment 7 during loading
    am_write(9, mk(201, 0, 0, 9, 6));
    run_id = 2; k = 0; take_cyc.delete();
    @(negedge clk);
    sup_we = 1'b1; sup_fpa = 8'd201; sup_nsn = 5'd4; sup_nspn = 5'd3;
    @(negedge clk);
    sup_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (k < 20 && cyc - t0 < 5000) @(negedge clk);
    for (int i = 0; i < 512; i++)
      if (dut.u_am.mem[i].x == 8'd153 && dut.u_am.mem[i].s == ST_LOADED) begin
        w = dut.u_am.mem[i];
        w.sn = 5'd7;
        am_write(i, w);
      end
    while (!halted && cyc - t0 < 20000) @(negedge clk);
    repeat (9) @(negedge clk);
    check(prot_int && !done && h == 8'd254, "run 2 stops with a protection interrupt");
    if (prot_int) n_int++;
    check(k == 127 + 128, $sformatf("run 2 stopped after the relabelled page (%0d words)", k));
    check(csn == 5'd4, "CSN holds the new segment number");
    w = find_page(55);
    check(w.sn == 5'd4 && w.y == STAR && w.z == 8'd2, "run 2 last page marked");

    // every mechanism happened
    check(n_alloc_write > 0, "allocation step seen");
    check(n_star > 0, "end mark seen");
    check(n_cross > 0, "page crossing seen");
    check(n_wait > 0, "memory-cycle wait seen");
    check(n_return > 0, "return exit seen");
    check(n_int > 0, "interrupt exit seen");
    check(n_seq_line > 0 && n_seq_page > 0 && n_seg_end > 0 && n_protect > 0 &&
          n_operand > 0 && n_miss > 0, "all address-unit outcomes seen");
    $display("mechanisms: alloc=%0d star=%0d cross=%0d wait=%0d return=%0d int=%0d seq=%0d/%0d end=%0d prot=%0d op=%0d miss=%0d",
             n_alloc_write, n_star, n_cross, n_wait, n_return, n_int, n_seq_line, n_seq_page,
             n_seg_end, n_protect, n_operand, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
