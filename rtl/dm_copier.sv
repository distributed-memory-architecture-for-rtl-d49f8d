// dm_copier: deep copy of one Erlang term into a destination area.
//
// This engine is the common core of the three heap-copying tasks of the
// system: sending (H_i -> mini heap in Q_j), receiving (mini heap in Q_i ->
// H_i) and garbage collection (from-space -> to-space of H_i). Given a root
// term it copies every cons cell and tuple reachable from it to consecutive
// words starting at dst_top in segment dst_seg and returns the rewritten
// root. Immediates are returned unchanged and copy nothing.
//
// It works breadth-first without a stack, in the manner of a Cheney scan:
// the root object is copied first; then a scan pointer walks the copied
// words, and every word that is still a pointer (tag 01 or 10) has its
// object copied to the end of the area and is replaced by the new pointer.
// Header words (tag 00) and immediates (tag 11) are skipped.
// With fwd low (message copies) the source is only read and an object
// reached twice is copied twice, as in an Erlang message copy. With fwd high
// (garbage collection) every copied object of two or more words has its
// first source word replaced by FWD_MARK and its second by the new pointer;
// meeting FWD_MARK later, the copier reuses that pointer instead of copying,
// so sharing survives the collection. The copy stops with overflow set if it
// would pass dst_limit.
//
// Source reads use the s_* port, destination reads and writes the d_* port;
// exactly one of them is used in any cycle, so both may be wired to one
// memory port. Read data is expected one cycle after a read request. Every
// copied word takes two cycles (read, write); a scanned word takes two more.
// The term tags are the document's (list pointer 01 with car at the address
// and cdr four bytes on); the tuple header format and the copying order are
// this design's choices.
module dm_copier
  import dm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  fwd,                   // leave forwarding marks (collector)
  input  word_t root,
  input  seg_t  dst_seg,
  input  widx_t dst_top,
  input  logic [WIDX_W:0] dst_limit,   // first word index not available
  output logic  busy,
  output logic  done,                  // one-cycle pulse
  output word_t new_root,
  output widx_t new_top,
  output logic  overflow,
  output mreq_t s_req,
  input  word_t s_rdata,
  output mreq_t d_req,
  input  word_t d_rdata
);
  typedef enum logic [3:0] {
    C_IDLE, C_RD0, C_HDR, C_RDK, C_WRK, C_LINK, C_MARK0, C_MARK1,
    C_FWD_RD, C_FWD_GOT, C_SCAN_RD, C_SCAN_EX, C_DONE
  } st_e;

  st_e               st;
  word_t             obj;        // pointer being copied
  word_t             src_base;   // byte address of its first word
  logic [WIDX_W:0]   top;        // next free word
  logic [WIDX_W:0]   scan;
  logic [WIDX_W:0]   obj_start;  // where the object being copied goes
  logic [25:0]       nwords;     // words of the object
  logic [25:0]       k;
  logic              first;      // copying the root object
  logic [WIDX_W:0]   fix_at;     // word to receive the new pointer
  logic [25:0]       hdr_n;      // size of the object, from its first word
  logic              hdr_fits;
  logic              hdr_moved;  // first word is a forwarding mark
  word_t             moved_to;   // the object's new pointer

  function automatic logic is_ptr(input word_t w);
    return w[1:0] == TAG_LIST || w[1:0] == TAG_BOXED;
  endfunction

  function automatic word_t dst_word_addr(input seg_t s, input logic [WIDX_W:0] w);
    word_t a;
    a = '0;
    a[WORD_W-1:LOCAL_AW] = s;
    a[LOCAL_AW-1:2]      = w[WIDX_W-1:0];
    return a;
  endfunction

  assign busy    = (st != C_IDLE);
  assign new_top = top[WIDX_W-1:0];

  assign hdr_n    = (obj[1:0] == TAG_BOXED) ? s_rdata[31:6] + 26'd1 : 26'd2;
  assign hdr_moved = fwd && (s_rdata == FWD_MARK);
  assign moved_to  = {dst_word_addr(dst_seg, obj_start)[WORD_W-1:2], obj[1:0]};
  assign hdr_fits = (hdr_n <= 26'(LOCAL_WORDS)) &&
                    (top + (WIDX_W+1)'(hdr_n) <= dst_limit);

  always_comb begin
    s_req = MREQ_IDLE;
    d_req = MREQ_IDLE;
    unique case (st)
      C_RD0: begin
        s_req.req  = 1'b1;
        s_req.addr = src_base;
      end
      C_RDK, C_FWD_RD: begin
        s_req.req  = 1'b1;
        s_req.addr = src_base + ((st == C_FWD_RD) ? word_t'(4) : word_t'({k, 2'b00}));
      end
      C_MARK0, C_MARK1: begin
        s_req.req   = 1'b1;
        s_req.we    = 1'b1;
        s_req.addr  = src_base + ((st == C_MARK1) ? word_t'(4) : word_t'(0));
        s_req.wdata = (st == C_MARK1) ? moved_to : FWD_MARK;
      end
      C_FWD_GOT: if (!first) begin
        d_req.req   = 1'b1;
        d_req.we    = 1'b1;
        d_req.addr  = dst_word_addr(dst_seg, fix_at);
        d_req.wdata = s_rdata;
      end
      C_HDR, C_WRK: begin
        d_req.req   = (st == C_WRK) || (hdr_fits && !hdr_moved);
        d_req.we    = 1'b1;
        d_req.addr  = dst_word_addr(dst_seg, obj_start + (WIDX_W+1)'(k));
        d_req.wdata = s_rdata;
      end
      C_LINK: if (!first) begin
        d_req.req   = 1'b1;
        d_req.we    = 1'b1;
        d_req.addr  = dst_word_addr(dst_seg, fix_at);
        d_req.wdata = moved_to;
      end
      C_SCAN_RD: if (scan < top) begin
        d_req.req  = 1'b1;
        d_req.addr = dst_word_addr(dst_seg, scan);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      obj       <= '0;
      src_base  <= '0;
      top       <= '0;
      scan      <= '0;
      obj_start <= '0;
      nwords    <= '0;
      k         <= '0;
      first     <= 1'b0;
      fix_at    <= '0;
      done      <= 1'b0;
      new_root  <= '0;
      overflow  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          top      <= {1'b0, dst_top};
          scan     <= {1'b0, dst_top};
          overflow <= 1'b0;
          new_root <= root;
          if (is_ptr(root)) begin
            obj      <= root;
            src_base <= {root[WORD_W-1:2], 2'b00};
            first    <= 1'b1;
            st       <= C_RD0;
          end else begin
            st <= C_DONE;
          end
        end
        C_RD0: begin
          obj_start <= top;
          k         <= '0;
          st        <= C_HDR;
        end
        C_HDR: begin
          // first word has arrived: size the object, write it if it fits
          nwords <= hdr_n;
          if (hdr_moved) begin
            st <= C_FWD_RD;
          end else if (!hdr_fits) begin
            overflow <= 1'b1;
            st       <= C_DONE;
          end else begin
            k  <= 26'd1;
            st <= (hdr_n > 26'd1) ? C_RDK : C_LINK;
          end
        end
        C_RDK: st <= C_WRK;
        C_WRK: begin
          k  <= k + 26'd1;
          st <= (k + 26'd1 < nwords) ? C_RDK : C_LINK;
        end
        C_LINK: begin
          top <= top + (WIDX_W+1)'(nwords);
          if (first)
            new_root <= moved_to;
          first <= 1'b0;
          st    <= (fwd && nwords > 26'd1) ? C_MARK0 : C_SCAN_RD;
        end
        C_MARK0:  st <= C_MARK1;
        C_MARK1:  st <= C_SCAN_RD;
        C_FWD_RD: st <= C_FWD_GOT;
        C_FWD_GOT: begin
          // already copied: reuse its new place
          if (first) new_root <= s_rdata;
          first <= 1'b0;
          st    <= C_SCAN_RD;
        end
        C_SCAN_RD: begin
          if (scan < top) st <= C_SCAN_EX;
          else            st <= C_DONE;
        end
        C_SCAN_EX: begin
          if (is_ptr(d_rdata)) begin
            obj      <= d_rdata;
            src_base <= {d_rdata[WORD_W-1:2], 2'b00};
            fix_at   <= scan;
            st       <= C_RD0;
          end else begin
            st <= C_SCAN_RD;
          end
          scan <= scan + 1'b1;
        end
        C_DONE: begin
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(s_req.req && d_req.req)) else $error("dm_copier: two ports used at once");
  end
endmodule
