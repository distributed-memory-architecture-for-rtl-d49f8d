// dm_gc: garbage collection module, one for the whole system.
//
// When the arbiter raises gc_req with gc_process = i, the collector works on
// the heap memory H_i through the H-bus while every other process keeps
// running. H_i holds two statically allocated regions (semispaces) of
// SEMI_WORDS words each; the active one holds the heap growing up from its
// base and the stack growing down from its end. A collection copies
// everything reachable from the roots into the other region and makes that
// one active:
//   1. read SPACE, SP and the number n of live x registers (H[HW_ARG_N]);
//   2. for every stack slot, copy the term it holds into the new region and
//      write the rewritten term to the same slot of the new region's stack;
//   3. for x[0]..x[n-1], copy and rewrite in place;
//   4. write the new heap top, stack pointer and SPACE, then pulse gc_done.
// The copying itself is done by dm_copier. A shared collector on the H-bus,
// the two alternating static regions and the roots named by n are the
// document's; the word layout, the order of the steps and the forwarding
// marks (a copied object's first from-space word becomes FWD_MARK and its
// second the new pointer, so shared sub-terms stay shared) are this
// design's choices. Only one-word objects (empty tuples) cannot be forwarded
// and are copied once per reference; if the survivors then do not fit,
// overflow is set and the collection completes with what fitted; the
// library module sees too few free words and reports an overflow.
//
// Timing: a few cycles per root plus two per copied word and two per
// scanned word; gc_done is a one-cycle pulse, after which the module waits
// for gc_req to fall.
module dm_gc
  import dm_pkg::*;
#(
  parameter int N  = 2,
  parameter int PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          gc_req,
  input  logic [PW-1:0] gc_process,
  output logic          gc_done,
  output logic          overflow,
  output mreq_t         m_req,
  input  word_t         m_rdata
);
  typedef enum logic [3:0] {
    G_IDLE, G_SP, G_N, G_SETUP, G_STK, G_STK_C, G_STK_W, G_XR, G_XR_C, G_XR_W,
    G_HTOP, G_SPW, G_SPACE, G_WAIT
  } st_e;

  st_e             st;
  int unsigned     seg;
  logic            space;
  logic [WIDX_W:0] sp, new_sp, top, depth;
  logic [3:0]      n;
  logic [WIDX_W:0] k;

  // copier
  logic  cp_start, cp_done, cp_busy, cp_ovf;
  word_t cp_root;
  widx_t cp_top;
  mreq_t cp_s, cp_d;
  word_t cp_root_new;

  dm_copier u_copy (
    .clk, .rst_n,
    .start(cp_start), .fwd(1'b1), .root(cp_root), .dst_seg(seg_t'(seg)),
    .dst_top(top[WIDX_W-1:0]), .dst_limit(new_sp),
    .busy(cp_busy), .done(cp_done), .new_root(cp_root_new), .new_top(cp_top),
    .overflow(cp_ovf),
    .s_req(cp_s), .s_rdata(m_rdata), .d_req(cp_d), .d_rdata(m_rdata)
  );

  function automatic word_t ha(input int s, input logic [WIDX_W:0] w);
    return gaddr(s, int'(w));
  endfunction

  assign cp_start = (st == G_STK_C) || (st == G_XR_C);
  assign cp_root  = m_rdata;

  always_comb begin
    m_req = MREQ_IDLE;
    unique case (st)
      G_IDLE:  if (gc_req) begin
        m_req.req  = 1'b1;
        m_req.addr = gaddr(H_SEG0 + int'(gc_process), HW_SPACE);
      end
      G_SP:    begin m_req.req = 1'b1; m_req.addr = ha(seg, (WIDX_W+1)'(HW_SP)); end
      G_N:     begin m_req.req = 1'b1; m_req.addr = ha(seg, (WIDX_W+1)'(HW_ARG_N)); end
      G_STK:   if (k < depth) begin
        m_req.req = 1'b1; m_req.addr = ha(seg, sp + k);
      end
      G_XR:    if (k < (WIDX_W+1)'(n)) begin
        m_req.req = 1'b1; m_req.addr = ha(seg, (WIDX_W+1)'(HW_X0) + k);
      end
      G_STK_W, G_XR_W: begin
        if (cp_busy) m_req = cp_s.req ? cp_s : cp_d;
        else if (cp_done) begin
          m_req.req   = 1'b1;
          m_req.we    = 1'b1;
          m_req.addr  = ha(seg, (st == G_STK_W) ? new_sp + k : (WIDX_W+1)'(HW_X0) + k);
          m_req.wdata = cp_root_new;
        end
      end
      G_HTOP:  begin m_req.req = 1'b1; m_req.we = 1'b1;
                     m_req.addr = ha(seg, (WIDX_W+1)'(HW_HTOP)); m_req.wdata = word_t'(top); end
      G_SPW:   begin m_req.req = 1'b1; m_req.we = 1'b1;
                     m_req.addr = ha(seg, (WIDX_W+1)'(HW_SP)); m_req.wdata = word_t'(new_sp); end
      G_SPACE: begin m_req.req = 1'b1; m_req.we = 1'b1;
                     m_req.addr = ha(seg, (WIDX_W+1)'(HW_SPACE)); m_req.wdata = word_t'(!space); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= G_IDLE;
      seg      <= 0;
      space    <= 1'b0;
      sp       <= '0;
      new_sp   <= '0;
      top      <= '0;
      depth    <= '0;
      n        <= '0;
      k        <= '0;
      gc_done  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      gc_done <= 1'b0;
      unique case (st)
        G_IDLE: if (gc_req) begin
          seg <= H_SEG0 + int'(gc_process);
          st  <= G_SP;
        end
        G_SP: begin space <= m_rdata[0]; st <= G_N; end
        G_N:  begin sp <= m_rdata[WIDX_W:0]; st <= G_SETUP; end
        G_SETUP: begin
          n      <= (m_rdata > 32'd8) ? 4'd8 : m_rdata[3:0];
          depth  <= (WIDX_W+1)'(semi_base(space) + SEMI_WORDS) - sp;
          new_sp <= (WIDX_W+1)'(semi_base(!space) + SEMI_WORDS) -
                    ((WIDX_W+1)'(semi_base(space) + SEMI_WORDS) - sp);
          top    <= (WIDX_W+1)'(semi_base(!space));
          overflow <= 1'b0;
          k      <= '0;
          st     <= G_STK;
        end
        G_STK: if (k < depth) st <= G_STK_C;
               else begin k <= '0; st <= G_XR; end
        G_STK_C: st <= G_STK_W;
        G_STK_W: if (cp_done) begin
          top <= {1'b0, cp_top};
          if (cp_ovf) overflow <= 1'b1;
          k   <= k + 1'b1;
          st  <= G_STK;
        end
        G_XR: if (k < (WIDX_W+1)'(n)) st <= G_XR_C;
              else st <= G_HTOP;
        G_XR_C: st <= G_XR_W;
        G_XR_W: if (cp_done) begin
          top <= {1'b0, cp_top};
          if (cp_ovf) overflow <= 1'b1;
          k   <= k + 1'b1;
          st  <= G_XR;
        end
        G_HTOP:  st <= G_SPW;
        G_SPW:   st <= G_SPACE;
        G_SPACE: begin gc_done <= 1'b1; st <= G_WAIT; end
        G_WAIT:  if (!gc_req) st <= G_IDLE;
        default: st <= G_IDLE;
      endcase
    end
  end
endmodule
