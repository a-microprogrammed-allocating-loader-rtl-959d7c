// loader_datapath: the registers of the allocating-loader and their micro-operations.
//
// Registers (document names): AR and B serve main memory; NI (next-instruction
// address, page part PA and line part LA), CSN (current segment number), FPA
// (first page of the available segment), PC (page counter), NSN and NSPN (number
// and page count of the new segment); A (argument), K (mask) and D (buffer) serve
// the associative memory; MR and MW request a match-read or match-write.
//
// Each micro-operation of control word F fires in the phase the document's
// Table 4 gives it: the A, K, PC, NI, D, NSPN, FPA and CSN transfers in P(1),
// MR/MW in P(2). An associative-memory operation requested by MR or MW is
// carried out in the following P(0) (D <- matching word, or matching word <- D)
// and the request bit is then cleared, so D is ready for the P(1) transfers of
// the next control word; this phase choice is this design's, it is the one that
// lets the document's word 2 use the D read by word 1. A match-read that finds
// no word leaves D unchanged. The main-memory cycle follows ring MC:
// AR <- NI in MC(0)*P(0), B <- MBUS in MC(1)*P(0) (`mbus_take` marks that edge),
// M(AR) <- B in MC(2)*P(0).
//
// The supervisor sets FPA, NSN and NSPN with `sup_we` before starting the
// loader; this load port is this design's choice.
module loader_datapath
  import loader_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  cword_t              f,
  input  logic                p0,
  input  logic                p1,
  input  logic                p2,
  input  logic [2:0]          mc,
  input  logic                sta0,
  // supervisor set-up
  input  logic                sup_we,
  input  logic [PA_W-1:0]     sup_fpa,
  input  logic [SN_W-1:0]     sup_nsn,
  input  logic [NSPN_W-1:0]   sup_nspn,
  // main memory
  input  logic [WORD_W-1:0]   mbus,
  output logic                mbus_take,
  output logic                mm_we,
  output logic [MA_W-1:0]     mm_addr,
  output logic [WORD_W-1:0]   mm_wdata,
  // associative memory
  output am_word_t            am_arg,
  output am_word_t            am_mask,
  output logic                am_mw,
  output am_word_t            am_wdata,
  output logic                am_busy,
  input  am_word_t            am_rdata,
  input  logic                am_hit,
  // tests
  output logic                la_is_127,
  output logic                dy_is_star,
  output logic                dsn_eq_csn,
  output logic                nspn_zero,
  // register view
  output logic [PA_W-1:0]     fpa_q,
  output logic [PA_W-1:0]     pc_q,
  output maddr_t              ni_q,
  output logic [SN_W-1:0]     csn_q,
  output logic [NSPN_W-1:0]   nspn_q
);
  maddr_t              ar, ni;
  logic [WORD_W-1:0]   b;
  logic [SN_W-1:0]     csn, nsn;
  logic [PA_W-1:0]     fpa, pc;
  logic [NSPN_W-1:0]   nspn;
  am_word_t            a, k, d;
  logic                mr, mw;

  assign la_is_127  = (ni.la == LAST_LINE);
  assign dy_is_star = (d.y == STAR);
  assign dsn_eq_csn = (d.sn == csn);
  assign nspn_zero  = (nspn == '0);

  assign am_arg   = a;
  assign am_mask  = k;
  assign am_wdata = d;
  assign am_mw    = p0 && mw;
  assign am_busy  = mr || mw;

  assign mbus_take = p0 && mc[1];
  assign mm_we     = p0 && mc[0];
  assign mm_addr   = ar;
  assign mm_wdata  = b;

  assign fpa_q  = fpa;
  assign pc_q   = pc;
  assign ni_q   = ni;
  assign csn_q  = csn;
  assign nspn_q = nspn;

  always_ff @(posedge clk) begin
    if (rst) begin
      ar <= '0; b <= '0; ni <= '0; csn <= '0; nsn <= '0; fpa <= '0; pc <= '0;
      nspn <= '0; a <= '0; k <= '0; d <= '0; mr <= 1'b0; mw <= 1'b0;
    end else begin
      if (sup_we) begin
        fpa  <= sup_fpa;
        nsn  <= sup_nsn;
        nspn <= sup_nspn;
      end

      if (p0) begin
        // associative-memory operation requested in the previous P(2)
        if (mr) begin
          if (am_hit) d <= am_rdata;
          mr <= 1'b0;
        end
        if (mw) mw <= 1'b0;
        // main-memory cycle
        if (mc[2]) ar <= ni;
        if (mc[1]) b  <= mbus;
      end

      if (p1) begin
        unique case (f.ka)
          2'b01: a <= '{x: fpa, y: '0, z: '0, sn: AVAIL_SN, s: ST_AVAILABLE};
          2'b10: a.x <= fpa;
          2'b11: a.s <= ST_LOADED;
          default: ;
        endcase
        if (f.ax_nipa) a.x <= ni.pa;
        if (f.k_alloc) k <= '{x: '1, y: '0, z: '0, sn: '1, s: '1};
        if (f.k_load)  k <= '{x: '1, y: '0, z: '0, sn: '0, s: '1};
        if (f.pc_clr)  pc <= '0;
        if (f.pc_inc)  pc <= pc + 1'b1;
        unique case (f.kn)
          2'b01: ni <= '{pa: fpa, la: '0};
          2'b10: ni.la <= ni.la + 1'b1;
          2'b11: ni.pa <= d.y;
          default: ;
        endcase
        if (f.t_la127 && la_is_127) a.x <= ni.pa;
        if (f.d_new) begin
          d.z  <= pc;
          d.sn <= nsn;
          d.s  <= ST_LOADED;
        end
        if (f.dy_star) d.y <= STAR;
        if (f.t_dy && !dy_is_star) ni.pa <= d.y;
        if (f.nspn_dec) nspn <= nspn - 1'b1;
        if (f.fpa_dy)   fpa  <= d.y;
        if (f.csn_nsn)  csn  <= nsn;
      end

      if (p2) begin
        if (f.mr || (f.mr_sta0 && !sta0)) mr <= 1'b1;
        if (f.mw) mw <= 1'b1;
      end
    end
  end

  // one associative-memory operation at a time
  a_one_am_op: assert property (@(posedge clk) disable iff (rst) !(mr && mw));
endmodule
