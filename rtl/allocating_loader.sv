// allocating_loader: microprogrammed allocating-loader with paged main memory.
//
// The supervisor writes the first page of the available segment (FPA), the new
// segment's number (NSN) and its page count (NSPN) through the `sup_*` port and
// pulses `start`. The 10-word microprogram in the control memory then
//   1. allocates: walks the available segment's linked list of pages in the
//      associative memory, relabelling the first NSPN pages with the new segment
//      number, loaded status and page order Z = 0, 1, ...; the last one gets the
//      end mark "*" in Y, and FPA is left pointing at the rest of the available
//      segment;
//   2. loads: stores one word from MBUS per main-memory cycle at successive
//      addresses of the new segment, following the page links, until the line
//      127 of the page whose Y is "*". `mbus_take` marks each word taken; the
//      source then presents the next one.
// The sequencer stops at `halted` with `h` = 255 when the segment is loaded, or
// with `h` = 254 (`prot_int`) if a page on the way belongs to another segment.
// Words are stored from line 1 of the first page onwards: the sequence advances
// the line address before it stores, exactly as the document's sequence does.
//
// When the loader is stopped the associative memory serves the dynamic address
// unit (`xl_*`), which maps segment-relative addresses to main-memory addresses
// at execution time. The `am_host_*` port sets up and reads the page map, and
// `mm_raddr`/`mm_rdata` read main memory. Clock: one edge per clock phase;
// reset is synchronous and active high.
module allocating_loader
  import loader_pkg::*;
#(
  parameter int unsigned AM_WORDS = 512
) (
  input  logic                        clk,
  input  logic                        rst,
  // supervisor
  input  logic                        sup_we,
  input  logic [PA_W-1:0]             sup_fpa,
  input  logic [SN_W-1:0]             sup_nsn,
  input  logic [NSPN_W-1:0]           sup_nspn,
  input  logic                        start,
  output logic                        halted,
  output logic                        done,
  output logic                        prot_int,
  output logic [7:0]                  h,
  output logic [PA_W-1:0]             fpa,
  output logic [PA_W-1:0]             pc,
  output maddr_t                      ni,
  output logic [SN_W-1:0]             csn,
  output logic [NSPN_W-1:0]           nspn,
  output logic [2:0]                  mc,
  output logic                        waiting,
  output logic                        am_multi,
  // memory bus from the backing store
  input  logic [WORD_W-1:0]           mbus,
  output logic                        mbus_take,
  // associative-memory host port
  input  logic                        am_host_we,
  input  logic [$clog2(AM_WORDS)-1:0] am_host_idx,
  input  am_word_t                    am_host_wdata,
  output am_word_t                    am_host_rdata,
  // main-memory read port
  input  logic [MA_W-1:0]             mm_raddr,
  output logic [WORD_W-1:0]           mm_rdata,
  // dynamic address unit
  input  logic                        xl_req,
  input  logic                        xl_operand,
  input  maddr_t                      xl_addr,
  input  logic [SN_W-1:0]             xl_csn,
  output logic                        xl_valid,
  output maddr_t                      xl_addr_out,
  output logic                        xl_protect,
  output logic                        xl_seg_end,
  output logic                        xl_miss
);
  cword_t     cm_data, f;
  logic       p0, p1, p2, sta0;
  logic       la_is_127, dy_is_star, dsn_eq_csn, nspn_zero;

  logic                mm_we;
  logic [MA_W-1:0]     mm_waddr;
  logic [WORD_W-1:0]   mm_wdata;

  am_word_t  ld_arg, ld_mask, ld_wdata, xl_arg, xl_mask, am_rdata, am_arg, am_mask;
  logic      ld_mw, ld_busy, am_hit, use_xl;

  control_memory #(.WORDS(CM_WORDS)) u_cm (.addr(h), .data(cm_data));

  micro_control u_ctl (
    .clk, .rst, .start, .h, .cm_data, .f, .p0, .p1, .p2, .mc, .sta0,
    .la_is_127, .dy_is_star, .dsn_eq_csn, .nspn_zero, .halted, .waiting
  );

  loader_datapath u_dp (
    .clk, .rst, .f, .p0, .p1, .p2, .mc, .sta0,
    .sup_we, .sup_fpa, .sup_nsn, .sup_nspn,
    .mbus, .mbus_take, .mm_we, .mm_addr(mm_waddr), .mm_wdata,
    .am_arg(ld_arg), .am_mask(ld_mask), .am_mw(ld_mw), .am_wdata(ld_wdata),
    .am_busy(ld_busy), .am_rdata, .am_hit,
    .la_is_127, .dy_is_star, .dsn_eq_csn, .nspn_zero,
    .fpa_q(fpa), .pc_q(pc), .ni_q(ni), .csn_q(csn), .nspn_q(nspn)
  );

  // The address unit gets the associative memory only while the loader is idle.
  assign use_xl  = halted && !ld_busy;
  assign am_arg  = use_xl ? xl_arg  : ld_arg;
  assign am_mask = use_xl ? xl_mask : ld_mask;

  assoc_memory #(.WORDS(AM_WORDS)) u_am (
    .clk, .rst, .arg(am_arg), .mask(am_mask), .mw(ld_mw), .wdata(ld_wdata),
    .rdata(am_rdata), .hit(am_hit), .multi(am_multi),
    .host_we(am_host_we), .host_idx(am_host_idx), .host_wdata(am_host_wdata),
    .host_rdata(am_host_rdata)
  );

  main_memory #(.PA_W(PA_W), .LA_W(LA_W), .WORD_W(WORD_W)) u_mm (
    .clk, .we(mm_we), .waddr(mm_waddr), .wdata(mm_wdata),
    .raddr(mm_raddr), .rdata(mm_rdata)
  );

  dynamic_address_unit u_dau (
    .clk, .rst, .req(xl_req && use_xl), .operand(xl_operand), .addr_in(xl_addr),
    .csn(xl_csn), .am_arg(xl_arg), .am_mask(xl_mask), .am_rdata, .am_hit,
    .valid(xl_valid), .addr_out(xl_addr_out), .protect(xl_protect),
    .seg_end(xl_seg_end), .miss(xl_miss)
  );

  assign done     = halted && (h == RET_ADDR);
  assign prot_int = halted && (h == INT_ADDR);
endmodule
