// dm_lib: library module L_i of process node IDX. It carries out, on behalf
// of the process module P_i, the seven BEAM operations too involved for the
// process circuit itself:
//   1 test_heap m,n      ensure m free words between heap top and stack
//   2 allocate  m,n      grow the stack by m+1 words
//   3 send               send x[1] to the process whose pid is in x[0]
//   4 receive            copy the current message into x[0] and the heap
//   5 remove_message     unlink the current message from the queue
//   6 save_message       step the current-message pointer on by one
//   7 wait_timeout t     wait up to t cycles for a new message
// P_i writes the arguments into H_i (x registers, m at H[HW_ARG_M], n at
// H[HW_ARG_N]), then the function number into its RUN register in the I/O
// module. L_i runs the function, writes a result code to H[HW_RESULT] and
// finally writes RUN back to 0, which tells P_i to continue. The function
// list, the RUN protocol and the send/GC handshakes are the document's; the
// word layouts, the result codes and the per-step sequences are this
// design's own.
//
// Free space is too small (test_heap, allocate, receive): L_i writes 1 to
// GC_REQ, waits for the arbiter to clear it again, and retries once; if it
// still does not fit the result is RES_OVERFLOW. allocate fills the new
// stack words with NIL so that the collector never meets stale pointers.
//
// send: L_i writes SEND_TO and SEND_REQ, waits for SEND_ACK, then over its
// Q-side port (own segment: local, otherwise the Q-bus) reads the head,
// tail and top of Q_j, copies the message term into Q_j behind a new record
// [next, term, size], links the record at the tail, moves the top, and
// points the save pointer at the record if no message was left to examine.
// It then clears SEND_REQ and waits for SEND_ACK to fall. An empty queue
// restarts at Q_BASE; space of removed messages is reused only then.
//
// The queue of this node is touched only while q_busy is high (receive,
// remove_message, save_message, the queue checks of wait_timeout); such a
// function starts only while no enqueue is requested or permitted, so that
// a sender and this module never use Q_i at once. wait_timeout watches the
// enqueue handshake and rechecks the queue after each completed enqueue.
//
// All memory accesses are one per cycle per port, reads answered one cycle
// later. Heap copying is done by dm_copier.
module dm_lib
  import dm_pkg::*;
#(
  parameter int IDX = 0,
  parameter int PW  = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output mreq_t         h_req,
  input  word_t         h_rdata,
  output mreq_t         q_req,
  input  word_t         q_rdata,
  // register values from the I/O module
  input  fn_e           run,
  input  logic          gc_req_flag,
  input  logic          send_ack,
  input  logic          enq_req,
  input  logic          enq_ready,
  output logic          q_busy,
  output logic          busy
);
  typedef enum logic [5:0] {
    L_IDLE,
    L_FIN_RES, L_FIN_RUN,
    L_GC_REQ, L_GC_W1, L_GC_W0,
    TH0, TH1, TH2, TH3, AL_SP, AL_INIT,
    SD0, SD1, SD2, SD3, SD4, SD5, SD6, SD7, SD8, SD9, SD10, SD11, SD12,
    SD13, SD14, SD15, SD16, SD17, SD18, SD19, SD_END, SD_W,
    R0, R1, R2, R3, R4, R5, R6, R7,
    M0, M1, M2, M3, M4, M5, M6, M7, M8, M9,
    V0, V1, V2, V3,
    W0, W1, W_CHK0, W_CHK1, W_LOOP
  } st_e;

  localparam int HSEG  = H_SEG0 + IDX;
  localparam int QSEG  = Q_SEG0 + IDX;
  localparam int IOSEG = IO_SEG0 + IDX;

  st_e    st;
  fn_e    fn;
  word_t  res;
  logic   gc_tried;
  word_t  m, sp, need, term;
  logic [WIDX_W:0] k;
  logic [PW-1:0]   dst;
  word_t  head, tail, top, rec, nxt, prev, save;
  word_t  new_term, new_top;
  word_t  t_lim, cnt;
  logic   seen;

  // copier
  logic  cp_start, cp_done, cp_busy, cp_ovf;
  word_t cp_root, cp_new_root;
  seg_t  cp_seg;
  widx_t cp_top, cp_new_top;
  logic [WIDX_W:0] cp_limit;
  mreq_t cp_s, cp_d;

  dm_copier u_copy (
    .clk, .rst_n,
    .start(cp_start), .fwd(1'b0), .root(cp_root), .dst_seg(cp_seg), .dst_top(cp_top),
    .dst_limit(cp_limit), .busy(cp_busy), .done(cp_done), .new_root(cp_new_root),
    .new_top(cp_new_top), .overflow(cp_ovf),
    .s_req(cp_s), .s_rdata(fn == FN_SEND ? h_rdata : q_rdata),
    .d_req(cp_d), .d_rdata(fn == FN_SEND ? q_rdata : h_rdata)
  );

  assign cp_start = (st == SD9) || (st == R4);
  assign cp_root  = term;
  assign busy     = (st != L_IDLE);

  function automatic logic queue_fn(input fn_e f);
    return f == FN_RECEIVE || f == FN_REMOVE || f == FN_SAVE;
  endfunction

  assign q_busy = ((st != L_IDLE) && queue_fn(fn)) || st == W_CHK0 || st == W_CHK1;

  function automatic mreq_t rd(input word_t a);
    mreq_t r;
    r = MREQ_IDLE; r.req = 1'b1; r.addr = a;
    return r;
  endfunction
  function automatic mreq_t wr(input word_t a, input word_t d);
    mreq_t r;
    r = MREQ_IDLE; r.req = 1'b1; r.we = 1'b1; r.addr = a; r.wdata = d;
    return r;
  endfunction
  function automatic word_t ha(input word_t w);
    return gaddr(HSEG, int'(w));
  endfunction
  function automatic word_t qa(input word_t w);
    return gaddr(QSEG, int'(w));
  endfunction
  function automatic word_t ja(input word_t w);   // Q of the send destination
    return gaddr(Q_SEG0 + int'(dst), int'(w));
  endfunction
  function automatic word_t ioa(input int w);
    return gaddr(IOSEG, w);
  endfunction

  // copier set-up for send (SD9) and receive (R4)
  always_comb begin
    if (fn == FN_SEND) begin
      cp_seg   = seg_t'(Q_SEG0 + int'(dst));
      cp_top   = widx_t'(top + QREC_HDR);
      cp_limit = (WIDX_W+1)'(LOCAL_WORDS);
    end else begin
      cp_seg   = seg_t'(HSEG);
      cp_top   = widx_t'(h_rdata);             // heap top, read in R3
      cp_limit = sp[WIDX_W:0];
    end
  end

  // memory requests of each state
  always_comb begin
    h_req = MREQ_IDLE;
    q_req = MREQ_IDLE;
    unique case (st)
      L_FIN_RES: h_req = wr(ha(HW_RESULT), res);
      L_FIN_RUN: h_req = wr(ioa(IO_RUN), '0);
      L_GC_REQ:  h_req = wr(ioa(IO_GC_REQ), 32'd1);
      // test_heap / allocate
      TH0:  h_req = rd(ha(HW_ARG_M));
      TH1:  h_req = rd(ha(HW_SP));
      TH2:  h_req = rd(ha(HW_HTOP));
      AL_SP:   h_req = wr(ha(HW_SP), sp - need);
      AL_INIT: if (word_t'(k) < need) h_req = wr(ha(sp - need + word_t'(k)), NIL);
      // send
      SD0:  h_req = rd(ha(HW_X0));
      SD1:  h_req = rd(ha(HW_X0 + 1));
      SD2:  h_req = wr(ioa(IO_SEND_TO), word_t'(dst));
      SD3:  h_req = wr(ioa(IO_SEND_REQ), 32'd1);
      SD5:  q_req = rd(ja(QW_HEAD));
      SD6:  q_req = rd(ja(QW_TAIL));
      SD7:  q_req = rd(ja(QW_TOP));
      SD10: begin h_req = cp_s; q_req = cp_d; end
      SD11: q_req = wr(ja(top), '0);
      SD12: q_req = wr(ja(top + 1), new_term);
      SD13: q_req = wr(ja(top + 2), new_top - top - QREC_HDR);
      SD14: q_req = wr(ja(tail == '0 ? QW_HEAD : tail), top);
      SD15: q_req = wr(ja(QW_TAIL), top);
      SD16: q_req = wr(ja(QW_TOP), new_top);
      SD17: q_req = rd(ja(QW_SAVE));
      SD18: if (q_rdata == '0) q_req = wr(ja(QW_SAVE), top);
      SD19: q_req = wr(ja(QW_PREV), tail);
      SD_END: h_req = wr(ioa(IO_SEND_REQ), '0);
      // receive
      R0:   q_req = rd(qa(QW_SAVE));
      R1:   if (q_rdata != '0) q_req = rd(qa(q_rdata + 1));
      R2:   h_req = rd(ha(HW_SP));
      R3:   h_req = rd(ha(HW_HTOP));
      R5:   begin q_req = cp_s; h_req = cp_d; end
      R6:   h_req = wr(ha(HW_X0), new_term);
      R7:   h_req = wr(ha(HW_HTOP), new_top);
      // remove_message
      M0:   q_req = rd(qa(QW_SAVE));
      M1:   if (q_rdata != '0) q_req = rd(qa(q_rdata));
      M2:   q_req = rd(qa(QW_PREV));
      M3:   q_req = wr(qa(q_rdata == '0 ? QW_HEAD : q_rdata), nxt);
      M4:   q_req = rd(qa(QW_TAIL));
      M5:   if (q_rdata == rec) q_req = wr(qa(QW_TAIL), prev);
      M6:   q_req = rd(qa(QW_HEAD));
      M7:   q_req = wr(qa(QW_SAVE), q_rdata);
      M8:   q_req = wr(qa(QW_PREV), '0);
      M9:   if (head == '0) q_req = wr(qa(QW_TOP), Q_BASE);
      // save_message
      V0:   q_req = rd(qa(QW_SAVE));
      V1:   if (q_rdata != '0) q_req = rd(qa(q_rdata));
      V2:   q_req = wr(qa(QW_SAVE), q_rdata);
      V3:   q_req = wr(qa(QW_PREV), save);
      // wait_timeout
      W0:     h_req = rd(ha(HW_ARG_M));
      W_CHK0: q_req = rd(qa(QW_SAVE));
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; fn <= FN_IDLE; res <= '0; gc_tried <= 1'b0;
      m <= '0; sp <= '0; need <= '0; term <= '0; k <= '0; dst <= '0;
      head <= '0; tail <= '0; top <= '0; rec <= '0; nxt <= '0; prev <= '0;
      save <= '0; new_term <= '0; new_top <= '0; t_lim <= '0; cnt <= '0;
      seen <= 1'b0;
    end else begin
      unique case (st)
        L_IDLE: if (run != FN_IDLE && !(queue_fn(run) && (enq_req || enq_ready))) begin
          fn       <= run;
          gc_tried <= 1'b0;
          res      <= RES_OK;
          unique case (run)
            FN_TEST_HEAP, FN_ALLOCATE: st <= TH0;
            FN_SEND:    st <= SD0;
            FN_RECEIVE: st <= R0;
            FN_REMOVE:  st <= M0;
            FN_SAVE:    st <= V0;
            FN_WAIT:    st <= W0;
            default:    st <= L_IDLE;
          endcase
        end
        L_FIN_RES: st <= L_FIN_RUN;
        L_FIN_RUN: st <= L_IDLE;
        L_GC_REQ:  begin gc_tried <= 1'b1; st <= L_GC_W1; end
        L_GC_W1:   if (gc_req_flag)  st <= L_GC_W0;
        L_GC_W0:   if (!gc_req_flag) st <= (fn == FN_RECEIVE) ? R0 : TH0;
        // ---------------- test_heap / allocate ----------------
        TH0: st <= TH1;
        TH1: begin m <= h_rdata; st <= TH2; end
        TH2: begin
          sp   <= h_rdata;
          need <= m + ((fn == FN_ALLOCATE) ? 32'd1 : 32'd0);
          st   <= TH3;
        end
        TH3: begin
          if (sp - h_rdata >= need && sp >= h_rdata) begin
            k  <= '0;
            st <= (fn == FN_ALLOCATE) ? AL_SP : L_FIN_RES;
          end else if (!gc_tried) begin
            st <= L_GC_REQ;
          end else begin
            res <= RES_OVERFLOW;
            st  <= L_FIN_RES;
          end
        end
        AL_SP:   st <= AL_INIT;
        AL_INIT: if (word_t'(k) < need) k <= k + 1'b1;
                 else st <= L_FIN_RES;
        // ---------------- send ----------------
        SD0: st <= SD1;
        SD1: begin dst <= PW'(h_rdata[31:4]); st <= SD2; end
        SD2: begin term <= h_rdata; st <= SD3; end
        SD3: st <= SD4;
        SD4: if (send_ack) st <= SD5;
        SD5: st <= SD6;
        SD6: begin head <= q_rdata; st <= SD7; end
        SD7: begin tail <= q_rdata; st <= SD8; end
        SD8: begin top <= (head == '0) ? word_t'(Q_BASE) : q_rdata; st <= SD9; end
        SD9: st <= SD10;
        SD10: if (cp_done) begin
          if (cp_ovf) begin
            res <= RES_OVERFLOW;
            st  <= SD_END;
          end else begin
            new_term <= cp_new_root;
            new_top  <= word_t'(cp_new_top);
            st       <= SD11;
          end
        end
        SD11: st <= SD12;
        SD12: st <= SD13;
        SD13: st <= SD14;
        SD14: st <= SD15;
        SD15: st <= SD16;
        SD16: st <= SD17;
        SD17: st <= SD18;
        SD18: st <= (q_rdata == '0) ? SD19 : SD_END;
        SD19: st <= SD_END;
        SD_END: st <= SD_W;
        SD_W: if (!send_ack) st <= L_FIN_RES;
        // ---------------- receive ----------------
        R0: st <= R1;
        R1: if (q_rdata == '0) begin
              res <= RES_NONE;
              st  <= L_FIN_RES;
            end else st <= R2;
        R2: begin term <= q_rdata; st <= R3; end
        R3: begin sp <= h_rdata; st <= R4; end
        R4: st <= R5;
        R5: if (cp_done) begin
          if (cp_ovf) begin
            if (!gc_tried) st <= L_GC_REQ;
            else begin res <= RES_OVERFLOW; st <= L_FIN_RES; end
          end else begin
            new_term <= cp_new_root;
            new_top  <= word_t'(cp_new_top);
            st       <= R6;
          end
        end
        R6: st <= R7;
        R7: st <= L_FIN_RES;
        // ---------------- remove_message ----------------
        M0: st <= M1;
        M1: if (q_rdata == '0) begin
              res <= RES_NONE;
              st  <= L_FIN_RES;
            end else begin
              rec <= q_rdata;
              st  <= M2;
            end
        M2: begin nxt <= q_rdata; st <= M3; end
        M3: begin prev <= q_rdata; st <= M4; end
        M4: st <= M5;
        M5: st <= M6;
        M6: st <= M7;
        M7: begin head <= q_rdata; st <= M8; end
        M8: st <= M9;
        M9: st <= L_FIN_RES;
        // ---------------- save_message ----------------
        V0: st <= V1;
        V1: if (q_rdata == '0) begin
              res <= RES_NONE;
              st  <= L_FIN_RES;
            end else begin
              save <= q_rdata;
              st   <= V2;
            end
        V2: st <= V3;
        V3: st <= L_FIN_RES;
        // ---------------- wait_timeout ----------------
        W0: st <= W1;
        W1: begin
          t_lim <= h_rdata;
          cnt   <= '0;
          seen  <= 1'b0;
          st    <= (enq_req || enq_ready) ? W_LOOP : W_CHK0;
        end
        W_CHK0: st <= W_CHK1;
        W_CHK1: if (q_rdata != '0) st <= L_FIN_RES;
                else st <= W_LOOP;
        W_LOOP: begin
          cnt <= cnt + 1;
          if (enq_req) seen <= 1'b1;
          if (seen && !enq_req && !enq_ready) begin
            seen <= 1'b0;
            st   <= W_CHK0;
          end else if (cnt >= t_lim) begin
            res <= RES_NONE;
            st  <= L_FIN_RES;
          end
        end
        default: st <= L_IDLE;
      endcase
    end
  end
endmodule
