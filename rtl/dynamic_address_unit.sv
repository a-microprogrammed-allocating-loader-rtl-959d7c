// dynamic_address_unit: execution-time address mapping through the associative memory.
//
// A loaded segment keeps the addresses it was assembled with (origin 0), so the
// processor maps each address when it uses it. Two operations, one per request:
//   SEQ      next-instruction address. Within a page only the line address LA
//            counts up. From line 127 the next page is found by a match-read
//            with the current page as X (status "loaded"): the next address is
//            {D(Y), 0}. D(SN) must equal the current segment number, otherwise
//            `protect` is raised; D(Y) = "*" raises `seg_end` (no next page).
//   OPERAND  operand or branch-target address. A 15-bit segment-relative
//            address keeps its line part; its page part is looked up as page
//            order Z (with the current segment number and status "loaded"), and
//            D(X) becomes the physical page. Indexing and indirection are left to
//            the processor, which forms the relative address before the request.
// The search uses the associative memory's combinational match; the result is
// registered, so `valid` and the outputs appear one clock after `req`.
// `miss` is raised when no word matches. The document gives what each operation
// yields; the match on segment number in OPERAND and the one-clock timing are
// this design's choices.
module dynamic_address_unit
  import loader_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         req,
  input  logic         operand,    // 1: OPERAND, 0: SEQ
  input  maddr_t       addr_in,    // SEQ: physical NI; OPERAND: relative address
  input  logic [SN_W-1:0] csn,
  // associative-memory search port
  output am_word_t     am_arg,
  output am_word_t     am_mask,
  input  am_word_t     am_rdata,
  input  logic         am_hit,
  // result
  output logic         valid,
  output maddr_t       addr_out,
  output logic         protect,
  output logic         seg_end,
  output logic         miss
);
  logic need_am;
  assign need_am = operand || (addr_in.la == LAST_LINE);

  always_comb begin
    if (operand) begin
      am_arg  = '{x: '0, y: '0, z: addr_in.pa, sn: csn, s: ST_LOADED};
      am_mask = '{x: '0, y: '0, z: '1, sn: '1, s: '1};
    end else begin
      am_arg  = '{x: addr_in.pa, y: '0, z: '0, sn: '0, s: ST_LOADED};
      am_mask = '{x: '1, y: '0, z: '0, sn: '0, s: '1};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid    <= 1'b0;
      addr_out <= '0;
      protect  <= 1'b0;
      seg_end  <= 1'b0;
      miss     <= 1'b0;
    end else begin
      valid <= req;
      if (req) begin
        protect <= 1'b0;
        seg_end <= 1'b0;
        miss    <= need_am && !am_hit;
        if (operand) begin
          addr_out <= '{pa: am_rdata.x, la: addr_in.la};
        end else if (!need_am) begin
          addr_out <= '{pa: addr_in.pa, la: addr_in.la + 1'b1};
        end else begin
          addr_out <= '{pa: am_rdata.y, la: '0};
          protect  <= am_hit && (am_rdata.sn != csn);
          seg_end  <= am_hit && (am_rdata.y == STAR);
        end
      end
    end
  end
endmodule
