// loader_full_memory_tb: successive loads that use up the whole main memory.
//
// Pages 0..254 are linked in a random order into one available segment
// (segment 9). Segments of random size (10 to 31 pages, 31 being the largest
// page count NSPN can hold) are then allocated and loaded one after another,
// each with its own segment number, until the free list is empty; the last
// segment takes all that is left, so FPA ends at the end mark. After each load the test checks
// the loader's exit, FPA and PC, every relabelled page-map word, the untouched
// rest of the free list (one page), and every word stored in main memory, using
// its own model of where each word must land (line 1 of the first page onward).
// The default sizes of the design are used throughout.
module loader_full_memory_tb;
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [WORD_W-1:0] seg_word(input int sgm, input int k);
    return {8'(sgm), 8'h5A, 32'(k) * 32'd2246822519 + 32'(sgm)};
  endfunction

  int cur_seg = 0;
  int k = 0;
  int n_multi = 0;
  assign mbus = seg_word(cur_seg, k);
  always @(posedge clk) begin
    if (mbus_take) k <= k + 1;
    if (am_multi && dut.u_dp.am_busy && dut.u_ctl.p0) n_multi++;  // during a match-read or -write
  end

  int page_idx [256];   // AM index holding each page's word

  task automatic am_write(input int idx, input am_word_t w);
    @(negedge clk);
    am_host_we = 1'b1; am_host_idx = 9'(idx); am_host_wdata = w;
    @(negedge clk);
    am_host_we = 1'b0;
  endtask

  function automatic am_word_t am_read(input int idx);
    return dut.u_am.mem[idx];
  endfunction

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [255];
    int idxs [512];
    int pos, n, left, sgm, nsegs, r, z, la, nwords;
    am_word_t w;
    rst = 1'b1; sup_we = 0; start = 0; sup_fpa = 0; sup_nsn = 0; sup_nspn = 0;
    am_host_we = 0; am_host_idx = 0; am_host_wdata = '0; mm_raddr = '0;
    xl_req = 0; xl_operand = 0; xl_addr = '0; xl_csn = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // random free list over pages 0..254 at random map positions
    for (int i = 0; i < 255; i++) order[i] = i;
    for (int i = 254; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < 512; i++) idxs[i] = i;
    for (int i = 511; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = idxs[i]; idxs[i] = idxs[j]; idxs[j] = t;
    end
    for (int i = 0; i < 255; i++) begin
      page_idx[order[i]] = idxs[i];
      am_write(idxs[i], '{x: 8'(order[i]), y: (i == 254) ? STAR : 8'(order[i+1]),
                          z: 8'd0, sn: AVAIL_SN, s: ST_AVAILABLE});
    end
    am_write(idxs[300], '{x: 8'(order[0]), y: 8'd0, z: 8'd0, sn: AVAIL_SN, s: ST_SEGREG});

    pos = 0; sgm = 0; nsegs = 0;
    while (pos < 255) begin
      left = 255 - pos;
      n = (left <= 31) ? left : $urandom_range(10, 31);
      sgm = sgm + 1;
      if (sgm == 9) sgm = 10;
      cur_seg = sgm; k = 0;
      @(negedge clk);
      sup_we = 1'b1; sup_fpa = 8'(order[pos]); sup_nsn = 5'(sgm); sup_nspn = 5'(n);
      @(negedge clk);
      sup_we = 1'b0; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      repeat (6) @(negedge clk);
      while (!halted) @(negedge clk);
      repeat (9) @(negedge clk);

      check(done && !prot_int, $sformatf("segment %0d (%0d pages) ends at return", sgm, n));
      check(fpa == ((pos + n < 255) ? 8'(order[pos + n]) : STAR), $sformatf("segment %0d: FPA", sgm));
      check(pc == 8'(n - 1), $sformatf("segment %0d: PC", sgm));
      for (int j = 0; j < n; j++) begin
        w = am_read(page_idx[order[pos + j]]);
        check(w.x == 8'(order[pos + j]) && w.sn == 5'(sgm) && w.s == ST_LOADED && w.z == 8'(j) &&
              w.y == ((j == n - 1) ? STAR : 8'(order[pos + j + 1])),
              $sformatf("segment %0d page %0d map word", sgm, j));
      end
      if (pos + n < 255) begin
        w = am_read(page_idx[order[pos + n]]);
        check(w.sn == AVAIL_SN && w.s == ST_AVAILABLE, "free list head untouched");
      end
      nwords = 127 + 128 * (n - 1);
      check(k == nwords, $sformatf("segment %0d: %0d words taken, expected %0d", sgm, k, nwords));
      for (int kk = 0; kk < nwords; kk++) begin
        r = kk + 1; z = r / 128; la = r % 128;
        mm_raddr = {8'(order[pos + z]), 7'(la)};
        #1;
        check(mm_rdata == seg_word(sgm, kk), $sformatf("segment %0d word %0d", sgm, kk));
      end
      pos = pos + n;
      nsegs++;
    end
    check(nsegs > 1, "several segments loaded");
    check(n_multi == 0, "no multiple match while loading");
    $display("segments loaded: %0d, pages: %0d", nsegs, pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
