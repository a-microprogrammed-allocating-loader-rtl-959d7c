// loader_pkg: shared types and constants of the microprogrammed allocating-loader.
//
// The associative-memory word (32 bits) holds, from the most significant end,
// page address X (where the page sits in main memory), page address Y (the next
// page of the same segment, or the end-of-segment mark), page address Z (the
// order of the page inside its segment), a 5-bit segment number and a 3-bit
// status. Field widths, status codes and the control-word bit assignment follow
// the document; the value of the end-of-segment mark, the "unused" status code
// and control bit F(30) are this design's own choices (see comments below).
//
// The control word is 32 bits, F(0) being the most significant bit, so that the
// packed struct members below appear in the document's bit order F(0)..F(31).
// The function ucode() returns the 10-word allocate/load microprogram.
package loader_pkg;

  localparam int unsigned PA_W    = 8;    // page address
  localparam int unsigned LA_W    = 7;    // line address
  localparam int unsigned MA_W    = PA_W + LA_W;  // 15-bit main-memory address
  localparam int unsigned WORD_W  = 48;   // main-memory word
  localparam int unsigned SN_W    = 5;    // segment number
  localparam int unsigned ST_W    = 3;    // status
  localparam int unsigned NSPN_W  = 5;    // new-segment page count

  // End-of-segment mark "*" in a Y field: the all-ones page address.
  localparam logic [PA_W-1:0] STAR = '1;
  // Segment number given to the available segment during allocation.
  localparam logic [SN_W-1:0] AVAIL_SN = 5'd9;
  localparam logic [LA_W-1:0] LAST_LINE = 7'd127;

  typedef enum logic [ST_W-1:0] {
    ST_LOADED    = 3'b000,
    ST_RELEASED  = 3'b001,
    ST_RESERVED  = 3'b010,
    ST_PERMANENT = 3'b011,
    ST_AVAILABLE = 3'b100,
    ST_SHARED    = 3'b101,
    ST_SEGREG    = 3'b110,   // word used as a segment-number register
    ST_UNUSED    = 3'b111    // empty word (this design's choice)
  } status_e;

  typedef struct packed {
    logic [PA_W-1:0] x;
    logic [PA_W-1:0] y;
    logic [PA_W-1:0] z;
    logic [SN_W-1:0] sn;
    logic [ST_W-1:0] s;
  } am_word_t;

  typedef struct packed {
    logic [PA_W-1:0] pa;
    logic [LA_W-1:0] la;
  } maddr_t;

  // Control word, F(0) first.
  typedef struct packed {
    logic [7:0] next;       // F(0-7)   branch address
    logic       fetch;      // F(8)     P0: F <- CM(H)
    logic       do_addr;    // F(9)     P2: DO ADDRESS
    logic [1:0] ka;         // F(10-11) P1: 01 A <- FPA-0-0-9-4, 10 A(X) <- FPA, 11 A(S) <- 0
    logic       ax_nipa;    // F(12)    P1: A(X) <- NI(PA)
    logic       k_alloc;    // F(13)    P1: K <- 255-0-0-31-7
    logic       k_load;     // F(14)    P1: K <- 255-0-0-0-7
    logic       pc_clr;     // F(15)    P1: PC <- 0
    logic       pc_inc;     // F(16)    P1: PC <- countup PC
    logic [1:0] kn;         // F(17-18) P1: 01 NI <- FPA-0, 10 NI(LA)++, 11 NI(PA) <- D(Y)
    logic       t_la127;    // F(19)    P1: test NI(LA)=127 -> STA(0)
    logic       d_new;      // F(20)    P1: D(Z,SN,S) <- PC-NSN-0
    logic       dy_star;    // F(21)    P1: D(Y) <- *
    logic       t_dy;       // F(22)    P1: test D(Y)=* -> STA(1)
    logic       t_sn;       // F(23)    P1: test D(SN)=CSN -> STA(2)
    logic       nspn_dec;   // F(24)    P1: NSPN <- countdn NSPN
    logic       t_nspn;     // F(25)    P1: test NSPN=0 -> STA(3)
    logic       fpa_dy;     // F(26)    P1: FPA <- D(Y)
    logic       csn_nsn;    // F(27)    P1: CSN <- NSN
    logic       mr;         // F(28)    P2: MR <- 1
    logic       mw;         // F(29)    P2: MW <- 1
    logic       mc_start;   // F(30)    P2: MC <- 4, start a main-memory cycle
    logic       mr_sta0;    // F(31)    P2: IF STA(0)=0 THEN MR <- 1
  } cword_t;

  localparam int unsigned CM_WORDS = 256;
  localparam logic [7:0] INT_ADDR = 8'd254;  // exit: protection interrupt
  localparam logic [7:0] RET_ADDR = 8'd255;  // exit: segment loaded

  // The microprogram. Words outside 0..9 are zero: fetching one stops the
  // sequencer, since its F(8) is 0.
  function automatic cword_t ucode(input int unsigned h);
    cword_t w;
    w = '0;
    unique case (h)
      0: begin  // initialisation
        w.ka = 2'b01; w.k_alloc = 1'b1; w.pc_clr = 1'b1; w.kn = 2'b01;
        w.csn_nsn = 1'b1; w.next = 8'd1;
      end
      1: begin  // W: count down pages left, match-read the next available page
        w.ka = 2'b10; w.nspn_dec = 1'b1; w.mr = 1'b1; w.next = 8'd2;
      end
      2: begin  // re-label the page, branch to X on the last page
        w.fpa_dy = 1'b1; w.d_new = 1'b1; w.t_nspn = 1'b1; w.next = 8'd4;
      end
      3: begin  // match-write the page, next page
        w.mw = 1'b1; w.pc_inc = 1'b1; w.next = 8'd1;
      end
      4: begin  // X: mark the end of the new segment and write the last page
        w.dy_star = 1'b1; w.mw = 1'b1; w.next = 8'd5;
      end
      5: begin  // loading initialisation
        w.ka = 2'b11; w.k_load = 1'b1; w.next = 8'd6;
      end
      6: begin  // Y: end of page?
        w.t_la127 = 1'b1; w.mr_sta0 = 1'b1; w.next = 8'd9;
      end
      7: begin  // protection check
        w.t_sn = 1'b1; w.next = INT_ADDR;
      end
      8: begin  // end of segment or move to the next page
        w.t_dy = 1'b1; w.next = RET_ADDR;
      end
      9: begin  // Z: next line, store a word from MBUS
        w.kn = 2'b10; w.mc_start = 1'b1; w.next = 8'd6;
      end
      default: w = '0;
    endcase
    if (h <= 9) begin
      w.fetch   = 1'b1;
      w.do_addr = 1'b1;
    end
    return w;
  endfunction

  // True when a control word holds one of the four tests that set STA.
  function automatic logic has_test(input cword_t w);
    return w.t_la127 | w.t_dy | w.t_sn | w.t_nspn;
  endfunction

endpackage
