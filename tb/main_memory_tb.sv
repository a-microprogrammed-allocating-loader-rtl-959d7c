// main_memory_tb: self-checking test of the paged main memory at its full size.
//
// Writes 2000 words at random addresses (plus the first and last word of the
// memory and every line of one page), keeping a copy in an associative array,
// then reads every written address back through the read port. It also checks
// that a cycle with write enable low changes nothing.
module main_memory_tb;
  localparam int AW = 15;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [47:0] wdata, rdata;
  int checks = 0, failures = 0;

  main_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  logic [47:0] ref_mem [int];

  task automatic wr(input int a, input logic [47:0] d);
    @(negedge clk);
    we = 1'b1; waddr = AW'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    ref_mem[a] = d;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    wr(0, 48'h0123_4567_89AB);
    wr(32767, 48'hFEDC_BA98_7654);
    for (int la = 0; la < 128; la++) wr(77 * 128 + la, {16'hBEEF, 32'(la)});
    for (int i = 0; i < 2000; i++) begin
      a = $urandom_range(0, 32767);
      wr(a, 48'({$urandom, $urandom}));
    end
    // a cycle with write enable low must not write
    @(negedge clk);
    we = 1'b0; waddr = 15'd0; wdata = '1;
    @(negedge clk);
    foreach (ref_mem[i]) begin
      raddr = AW'(i);
      #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", i, rdata, ref_mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
