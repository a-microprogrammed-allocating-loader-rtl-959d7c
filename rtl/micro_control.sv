// micro_control: the microprogram sequencer of the loader.
//
// One rising clock edge ends one clock phase. The phase counter P runs
// P(0), P(1), P(2) and repeats; three phases make one control-memory cycle and
// three control-memory cycles one main-memory cycle, as in the document.
//   P(0): F <- CM(H) when F(8) of the current word is 1.
//   P(1): the data-path micro-operations; the four tests (F(19), F(22), F(23),
//         F(25)) write their result into status register STA(0..3).
//   P(2): MR/MW set-up in the data path; DO ADDRESS (F(9)): when STA is zero
//         H <- H+1, otherwise H <- F(0-7) and STA <- 0. A word holding none of
//         the four tests branches to F(0-7) unconditionally (this design's
//         reading: the document needs such a jump from word 9 back to word 6).
// These phase assignments are those of the document's control-word table; the
// branch has to come in P(2), after the P(1) tests that decide it.
// The main-memory cycle register MC is a ring 100 -> 010 -> 001 -> 000 that
// steps at each P(2); F(30) starts it at 100. The data path does AR <- NI in
// MC(0)*P(0), B <- MBUS in MC(1)*P(0) and M(AR) <- B in MC(2)*P(0). A word with
// F(30) that meets a main-memory cycle still in its first two thirds waits one
// control-memory cycle (its P(1)/P(2) operations are skipped and it is not
// replaced at the next P(0)), so a memory cycle is never cut short; this wait
// is this design's choice. MC keeps running while the sequencer is stopped.
//
// After reset F = 0, so nothing is fetched. `start` (sampled at any phase,
// acted on at the next P(2)) sets H <- 0, STA <- 0 and F <- F(8) only, so word 0
// is fetched at the following P(0). Fetching a word with F(8) = 0 (the exit
// addresses) stops the sequencer; `halted` is then high and `h` tells which exit.
module micro_control
  import loader_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic [7:0] h,          // control-memory address register H
  input  cword_t     cm_data,    // CM(H)
  output cword_t     f,          // control-word register F
  output logic       p0,         // phase enables for the data path
  output logic       p1,
  output logic       p2,
  output logic [2:0] mc,         // 3'b100 = MC(0), 3'b010 = MC(1), 3'b001 = MC(2)
  output logic       sta0,       // STA(0), read by F(31)
  // test results from the data path, valid in P(1)
  input  logic       la_is_127,
  input  logic       dy_is_star,
  input  logic       dsn_eq_csn,
  input  logic       nspn_zero,
  output logic       halted,
  output logic       waiting     // the current word is waiting for the memory cycle
);
  logic [1:0] phase;
  logic [3:0] sta;     // sta[i] is STA(i)
  logic       held;    // previous control-memory cycle was a wait cycle
  logic       start_pend;

  assign waiting = f.mc_start && (mc == 3'b100 || mc == 3'b010);
  assign p0 = (phase == 2'd0);
  assign p1 = (phase == 2'd1) && !waiting;
  assign p2 = (phase == 2'd2) && !waiting;
  assign sta0 = sta[0];
  assign halted = !f.fetch;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= 2'd0;
      h          <= '0;
      f          <= '0;
      sta        <= '0;
      mc         <= '0;
      held       <= 1'b0;
      start_pend <= 1'b0;
    end else begin
      phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      if (start) start_pend <= 1'b1;

      unique case (phase)
        2'd0: begin
          if (f.fetch && !held) f <= cm_data;
        end
        2'd1: begin
          if (!waiting) begin
            if (f.t_la127) sta[0] <= !la_is_127;
            if (f.t_dy)    sta[1] <= dy_is_star;
            if (f.t_sn)    sta[2] <= !dsn_eq_csn;
            if (f.t_nspn)  sta[3] <= nspn_zero;
          end
        end
        default: begin  // P(2)
          held <= waiting;
          // main-memory cycle ring
          if (f.mc_start && !waiting) mc <= 3'b100;
          else                        mc <= mc >> 1;
          if (start_pend && halted) begin
            start_pend <= 1'b0;
            h          <= '0;
            sta        <= '0;
            f          <= '0;
            f.fetch    <= 1'b1;
          end else if (f.do_addr && !waiting) begin
            if (!has_test(f))    h <= f.next;
            else if (sta == '0)  h <= h + 8'd1;
            else begin
              h   <= f.next;
              sta <= '0;
            end
          end
        end
      endcase
    end
  end

  a_mc_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(mc));
endmodule
