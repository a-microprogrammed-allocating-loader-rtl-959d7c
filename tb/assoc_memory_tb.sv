// assoc_memory_tb: self-checking test of the associative page-map memory.
//
// After reset every word must be unused. The test fills the memory with the
// page map of a small example (four segments of three pages each, plus their
// segment-number registers), then checks masked match-reads on X with status,
// on Z with segment number and status, and on segment-number registers; a
// match-write that must replace exactly the matching word; a match-write with
// no match that must change nothing; and the multiple-match flag with
// lowest-index selection.
module assoc_memory_tb;
  import loader_pkg::*;
  localparam int W = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, mw, hit, multi, host_we;
  am_word_t arg, mask, wdata, rdata, host_wdata, host_rdata;
  logic [8:0] host_idx;
  int checks = 0, failures = 0;

  assoc_memory dut (.*);

  am_word_t model [W];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic am_word_t mk(input int x, y, z, sn, s);
    return '{x: 8'(x), y: 8'(y), z: 8'(z), sn: 5'(sn), s: 3'(s)};
  endfunction

  task automatic hwrite(input int i, input am_word_t w);
    @(negedge clk);
    host_we = 1'b1; host_idx = 9'(i); host_wdata = w;
    @(negedge clk);
    host_we = 1'b0;
    model[i] = w;
  endtask

  // reference search, written independently of the design
  function automatic int ref_find(input am_word_t a, input am_word_t m, output int count);
    int first = -1;
    count = 0;
    for (int i = 0; i < W; i++) begin
      if (((model[i] ^ a) & m) == 32'h0) begin
        if (first < 0) first = i;
        count++;
      end
    end
    return first;
  endfunction

  task automatic search(input am_word_t a, input am_word_t m, input string what);
    int idx, cnt;
    arg = a; mask = m;
    #1;
    idx = ref_find(a, m, cnt);
    check(hit == (cnt > 0), {what, ": hit"});
    check(multi == (cnt > 1), {what, ": multi"});
    if (cnt > 0) check(rdata == model[idx], {what, ": data"});
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pages [12];
    rst = 1; mw = 0; host_we = 0; host_idx = 0; host_wdata = '0; arg = '0; mask = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < W; i++) begin
      model[i] = '0; model[i].s = 3'b111;
    end
    for (int i = 0; i < W; i += 37) begin
      host_idx = 9'(i);
      #1;
      check(host_rdata.s == 3'b111, "word unused after reset");
    end
    // four segments of three pages each, pages spread over the memory
    for (int i = 0; i < 12; i++) pages[i] = (i * 53 + 11) % 256;
    for (int sgm = 0; sgm < 4; sgm++) begin
      for (int j = 0; j < 3; j++)
        hwrite(100 + sgm * 3 + j * 40, mk(pages[sgm*3+j], (j == 2) ? 255 : pages[sgm*3+j+1], j, sgm + 1, 0));
      hwrite(400 + sgm, mk(pages[sgm*3], 0, 0, sgm + 1, 6));
    end
    for (int i = 0; i < 12; i++)
      search(mk(pages[i], 0, 0, 0, 0), mk(255, 0, 0, 0, 7), $sformatf("match X=%0d", pages[i]));
    for (int sgm = 1; sgm <= 4; sgm++)
      for (int z = 0; z < 4; z++)
        search(mk(0, 0, z, sgm, 0), mk(0, 0, 255, 31, 7), $sformatf("match Z=%0d SN=%0d", z, sgm));
    search(mk(0, 0, 0, 3, 6), mk(0, 0, 0, 31, 7), "segment-number register 3");
    search(mk(0, 0, 0, 0, 4), mk(0, 0, 0, 0, 7), "no available page");
    // match-write the second page of segment 2
    arg = mk(pages[4], 0, 0, 0, 0); mask = mk(255, 0, 0, 0, 7);
    wdata = mk(pages[4], 200, 9, 17, 5);
    @(negedge clk);
    mw = 1'b1;
    @(negedge clk);
    mw = 1'b0;
    model[100 + 3 + 40] = wdata;
    for (int i = 0; i < W; i++) begin
      host_idx = 9'(i);
      #1;
      if (i % 8 == 0 || (i >= 100 && i < 200)) check(host_rdata == model[i], $sformatf("word %0d after match-write", i));
    end
    // match-write without a match changes nothing
    arg = mk(250, 0, 0, 0, 2); mask = mk(255, 0, 0, 0, 7); wdata = mk(1, 2, 3, 4, 5);
    @(negedge clk); mw = 1'b1; @(negedge clk); mw = 1'b0;
    for (int i = 0; i < W; i++) begin
      host_idx = 9'(i);
      #1;
      check(host_rdata == model[i], $sformatf("word %0d unchanged by a missed write", i));
    end
    // two words with the same fields: multiple match, lowest index chosen
    hwrite(10, mk(7, 1, 0, 20, 2));
    hwrite(20, mk(7, 2, 0, 20, 2));
    search(mk(7, 0, 0, 20, 2), mk(255, 0, 0, 31, 7), "double match");
    check(rdata.y == 8'd1, "lowest index wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
