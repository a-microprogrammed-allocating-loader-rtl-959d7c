// control_memory_tb: checks the microprogram held in the control memory.
//
// The expected control words are written here as lists of the control bits
// F(i) each word sets (bit 0 being the leftmost bit of the 32-bit word) plus its
// branch address F(0-7), taken from the loader's sequence: initialisation,
// allocation loop (words 1-3), end of allocation (4), loading set-up (5) and
// the loading loop (6-9) with its exits 254 (interrupt) and 255 (return).
// Every other word must be zero.
module control_memory_tb;
  import loader_pkg::*;
  logic [7:0] addr;
  cword_t data;
  int checks = 0, failures = 0;

  control_memory dut (.addr, .data);

  function automatic logic [31:0] cw(input int nxt, input int bits [$]);
    logic [31:0] v;
    v = 32'(nxt) << 24;
    foreach (bits[i]) v[31 - bits[i]] = 1'b1;
    return v;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_w [256];
    foreach (exp_w[i]) exp_w[i] = '0;
    // F(8) fetch, F(9) DO ADDRESS in every word
    exp_w[0] = cw(1,   '{8, 9, 11, 13, 15, 18, 27});        // KA=01, KN=01
    exp_w[1] = cw(2,   '{8, 9, 10, 24, 28});                // KA=10
    exp_w[2] = cw(4,   '{8, 9, 20, 25, 26});
    exp_w[3] = cw(1,   '{8, 9, 16, 29});
    exp_w[4] = cw(5,   '{8, 9, 21, 29});
    exp_w[5] = cw(6,   '{8, 9, 10, 11, 14});                // KA=11
    exp_w[6] = cw(9,   '{8, 9, 19, 31});
    exp_w[7] = cw(254, '{8, 9, 23});
    exp_w[8] = cw(255, '{8, 9, 22});
    exp_w[9] = cw(6,   '{8, 9, 17, 30});                    // KN=10
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      checks++;
      if (data !== exp_w[i]) begin
        failures++;
        $display("FAIL: CM(%0d) = %h, expected %h", i, data, exp_w[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
