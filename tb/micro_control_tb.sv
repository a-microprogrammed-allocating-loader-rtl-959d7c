// micro_control_tb: self-checking test of the microprogram sequencer.
//
// The sequencer runs a short test program supplied here (not the loader's):
// an unconditional jump, a test that fails (H counts up), a test that succeeds
// (branch to F(0-7), STA cleared), a failing test that starts a main-memory
// cycle (H must count up, which it only does if the branch cleared STA), a
// second such word that must wait for the memory cycle to finish, a taken
// branch to an empty word, and the stop. After every control-memory cycle
// (three clocks) the test compares H and the main-memory ring MC with values
// worked out by hand, checks the phase outputs and counts wait cycles.
module micro_control_tb;
  import loader_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, start, p0, p1, p2, sta0, halted, waiting;
  logic la_is_127, dy_is_star, dsn_eq_csn, nspn_zero;
  logic [7:0] h;
  logic [2:0] mc;
  cword_t cm_data, f;
  int checks = 0, failures = 0;

  micro_control dut (.*);

  cword_t prog [256];
  assign cm_data = prog[h];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tph = 0;
  int n_wait = 0;
  always @(posedge clk) begin
    if (rst) tph <= 0;
    else begin
      tph <= (tph + 1) % 3;
      if (waiting && tph == 1) n_wait++;
    end
  end

  initial begin
    static int exp_h  [9] = '{3, 4, 9, 10, 10, 10, 11, 20, 20};
    static logic [2:0] exp_mc [9] = '{3'b000, 3'b000, 3'b000, 3'b100, 3'b010, 3'b001, 3'b100, 3'b010, 3'b001};
    foreach (prog[i]) prog[i] = '0;
    prog[0].next = 8'd3;  prog[0].fetch = 1; prog[0].do_addr = 1;
    prog[3].next = 8'd7;  prog[3].fetch = 1; prog[3].do_addr = 1; prog[3].t_nspn = 1;
    prog[4].next = 8'd9;  prog[4].fetch = 1; prog[4].do_addr = 1; prog[4].t_la127 = 1;
    prog[9].next = 8'd30; prog[9].fetch = 1; prog[9].do_addr = 1; prog[9].mc_start = 1; prog[9].t_nspn = 1;
    prog[10].next = 8'd11; prog[10].fetch = 1; prog[10].do_addr = 1; prog[10].mc_start = 1;
    prog[11].next = 8'd20; prog[11].fetch = 1; prog[11].do_addr = 1; prog[11].t_dy = 1; prog[11].t_sn = 1;
    rst = 1; start = 0; la_is_127 = 0; dy_is_star = 1; dsn_eq_csn = 1; nspn_zero = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(halted, "stopped after reset");
    repeat (5) @(negedge clk);
    check(h == 8'd0 && halted, "nothing runs before start");
    // start during phase 0 (tph==0 before the next edge)
    while (tph != 0) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // wait for the P(2) edge that applies start
    while (tph != 0) @(negedge clk);
    check(!halted && h == 8'd0, "start loads H=0 and the fetch bit");
    for (int c = 0; c < 9; c++) begin
      // one control-memory cycle: P(0), P(1), P(2)
      check(p0 && !p1 && !p2, "P(0) phase");
      @(negedge clk);
      if (c == 2) check(sta0 == 1'b0, "STA(0) cleared by the taken branch");
      @(negedge clk);
      if (c == 2) check(sta0 == 1'b1, "STA(0) set by a failing NI(LA)=127 test");
      @(negedge clk);
      if (c == 3) check(sta0 == 1'b0, "STA(0) still clear after the next word");
      check(h == 8'(exp_h[c]), $sformatf("cycle %0d: H=%0d expected %0d", c, h, exp_h[c]));
      check(mc == exp_mc[c], $sformatf("cycle %0d: MC=%b expected %b", c, mc, exp_mc[c]));
    end
    check(halted, "stopped at an empty word");
    repeat (3) @(negedge clk);
    check(mc == 3'b000, "memory cycle ends after the stop");
    check(n_wait == 2, $sformatf("two wait cycles (%0d)", n_wait));
    check(h == 8'd20, "H stays at the exit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
