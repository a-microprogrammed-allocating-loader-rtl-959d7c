// dynamic_address_unit_tb: self-checking test of execution-time address mapping.
//
// A behavioural page map answers the unit's searches: segment 1 on pages
// 1-5-9, segment 2 on pages 6-4-8 and segment 3 on 3-11-0 (as in a small
// 12-page example), all loaded. The test checks, one clock after each request:
// line stepping inside a page, page crossing through the Y link, the end of a
// segment, a protection fault when the page belongs to another segment, operand
// mapping of every page order of every segment, and a miss.
module dynamic_address_unit_tb;
  import loader_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, req, operand, valid, protect, seg_end, miss, am_hit;
  maddr_t addr_in, addr_out;
  logic [SN_W-1:0] csn;
  am_word_t am_arg, am_mask, am_rdata;
  int checks = 0, failures = 0;

  dynamic_address_unit dut (.*);

  am_word_t map [12];
  int segs [3][3] = '{'{1, 5, 9}, '{6, 4, 8}, '{3, 11, 0}};

  always_comb begin
    am_hit = 1'b0;
    am_rdata = '0;
    for (int i = 0; i < 12; i++)
      if (!am_hit && ((map[i] ^ am_arg) & am_mask) == '0) begin
        am_hit = 1'b1;
        am_rdata = map[i];
      end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ask(input bit op, input int pa, la, sn);
    @(negedge clk);
    req = 1; operand = op; addr_in = '{pa: 8'(pa), la: 7'(la)}; csn = 5'(sn);
    @(negedge clk);
    req = 0;
    check(valid, "valid one clock after the request");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++)
      for (int j = 0; j < 3; j++)
        map[s*3+j] = '{x: 8'(segs[s][j]), y: (j == 2) ? STAR : 8'(segs[s][j+1]),
                       z: 8'(j), sn: 5'(s + 1), s: ST_LOADED};
    // one page of another status that must never be found
    map[9]  = '{x: 8'd2, y: 8'd10, z: 8'd0, sn: 5'd4, s: ST_AVAILABLE};
    map[10] = '{x: 8'd10, y: 8'd7, z: 8'd1, sn: 5'd4, s: ST_AVAILABLE};
    map[11] = '{x: 8'd1, y: 8'd0, z: 8'd0, sn: 5'd1, s: ST_SEGREG};
    rst = 1; req = 0; operand = 0; addr_in = '0; csn = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!valid, "no result without a request");
    for (int la = 0; la < 127; la += 9) begin
      ask(0, 5, la, 1);
      check(addr_out == '{pa: 8'd5, la: 7'(la + 1)} && !protect && !seg_end && !miss, $sformatf("step line %0d", la));
    end
    for (int s = 0; s < 3; s++)
      for (int j = 0; j < 3; j++) begin
        ask(0, segs[s][j], 127, s + 1);
        check(!protect && !miss, "crossing in own segment");
        if (j < 2) check(addr_out == '{pa: 8'(segs[s][j+1]), la: 7'd0} && !seg_end, $sformatf("cross from page %0d", segs[s][j]));
        else       check(seg_end, $sformatf("end of segment %0d", s + 1));
      end
    ask(0, 6, 127, 1);
    check(protect, "page of segment 2 used by segment 1");
    ask(0, 2, 127, 4);
    check(miss, "available page is not a loaded page");
    for (int s = 0; s < 3; s++)
      for (int j = 0; j < 3; j++) begin
        ask(1, j, 33 + j, s + 1);
        check(addr_out == '{pa: 8'(segs[s][j]), la: 7'(33 + j)} && !miss, $sformatf("operand seg %0d order %0d", s + 1, j));
      end
    ask(1, 3, 0, 2);
    check(miss, "operand past the end of the segment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
