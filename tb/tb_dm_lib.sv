// tb_dm_lib: one process node built from the library module, its I/O
// module and its two memories, with the arbiter and the GC module replaced
// by small behavioural responders in this file (the GC responder "frees"
// the heap by lowering the heap top). The testbench acts as the process
// module and checks test_heap with and without a GC request, the overflow
// result after a GC that does not help, allocate, sending to its own queue
// and the resulting queue records, receive of a list into the heap,
// save_message and remove_message on a two-message queue, the reset of an
// emptied queue, wait_timeout by timeout and the enqueue lock while the
// queue is busy.
module tb_dm_lib;
  import dm_pkg::*;
  localparam int PW = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  mreq_t p_req, l_h, l_q, h_dn, q_dn;
  word_t p_rdata, l_hrd, l_qrd, h_rd, q_rd;
  fn_e run;
  logic gc_flag, sreq, sack, enq, rdy, q_busy, busy;
  logic [PW-1:0] sto;
  logic gc_clr = 0, ack_set = 0, ack_clr = 0, enq_set = 0, enq_clr = 0;
  logic tb_enq_set = 0;
  int checks = 0, failures = 0, n_gc = 0, lock_viol = 0;

  dm_lib #(.IDX(0), .PW(PW)) dut (
    .clk, .rst_n, .h_req(l_h), .h_rdata(l_hrd), .q_req(l_q), .q_rdata(l_qrd),
    .run, .gc_req_flag(gc_flag), .send_ack(sack), .enq_req(enq), .enq_ready(rdy),
    .q_busy, .busy);
  dm_io #(.IDX(0), .PW(PW)) u_io (
    .clk, .rst_n, .p_req, .p_rdata, .l_req(l_h), .l_rdata(l_hrd),
    .lq_req(l_q), .lq_rdata(l_qrd), .h_dn, .h_dn_rdata(h_rd), .q_dn, .q_dn_rdata(q_rd),
    .gc_clr, .ack_set, .ack_clr, .enq_set(enq_set | tb_enq_set), .enq_clr, .q_busy,
    .run, .gc_req(gc_flag), .send_req(sreq), .send_to(sto), .send_ack(sack),
    .enq_req(enq), .enq_ready(rdy));
  dm_spram u_h (.clk, .en(h_dn.req), .we(h_dn.we), .addr(widx_of(h_dn.addr)),
                .wdata(h_dn.wdata), .rdata(h_rd));
  dm_spram u_q (.clk, .en(q_dn.req), .we(q_dn.we), .addr(widx_of(q_dn.addr)),
                .wdata(q_dn.wdata), .rdata(q_rd));
  always #5 clk = ~clk;

  // behavioural arbiter (sends to itself only) and GC
  int gc_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    enq_set <= 0; ack_set <= 0; ack_clr <= 0; enq_clr <= 0; gc_clr <= 0;
    if (sreq && !sack && !enq && !enq_set) enq_set <= 1;
    if (sreq && !sack && rdy && !ack_set) ack_set <= 1;
    if (!sreq && sack && !ack_clr) begin ack_clr <= 1; enq_clr <= 1; end
    if (gc_flag && !gc_clr) begin
      gc_cnt++;
      if (gc_cnt == 20) begin
        u_h.mem[HW_HTOP] <= HEAP_BASE;
        gc_clr <= 1; gc_cnt = 0; n_gc++;
      end
    end
    if (rdy && q_busy) lock_viol++;
    if (q_dn.req && int'(seg_of(q_dn.addr)) != Q_SEG0) begin
      failures++; $display("FAIL Q access to segment %0d", seg_of(q_dn.addr));
    end
  end

  task automatic chk(input string w, input word_t g, input word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h vs %h", w, g, e); end
  endtask
  task automatic acc(input logic we, input word_t a, input word_t d, output word_t r);
    @(negedge clk);
    p_req = '{req: 1'b1, we: we, addr: a, wdata: d};
    @(negedge clk);
    p_req = MREQ_IDLE;
    r = p_rdata;
  endtask
  task automatic hw(input int w, input word_t d);
    word_t r; acc(1'b1, gaddr(H_SEG0, w), d, r);
  endtask
  task automatic hr(input int w, output word_t r);
    acc(1'b0, gaddr(H_SEG0, w), '0, r);
  endtask
  task automatic call(input fn_e f, output word_t res);
    word_t r;
    acc(1'b1, gaddr(IO_SEG0, IO_RUN), word_t'(f), r);
    do acc(1'b0, gaddr(IO_SEG0, IO_RUN), '0, r); while (r != '0);
    hr(HW_RESULT, res);
  endtask
  function automatic word_t qm(input int w);
    return u_q.mem[w];
  endfunction

  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t res, r, sp, p, cur;
    longint c0;
    p_req = MREQ_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    hw(HW_SPACE, 0); hw(HW_HTOP, HEAP_BASE); hw(HW_SP, HEAP_BASE + SEMI_WORDS);
    // ---- test_heap / allocate ----
    hw(HW_ARG_M, 10); hw(HW_ARG_N, 0);
    call(FN_TEST_HEAP, res); chk("test_heap ok", res, RES_OK); chk("no GC", n_gc, 0);
    hw(HW_ARG_M, 2);
    call(FN_ALLOCATE, res); chk("allocate ok", res, RES_OK);
    hr(HW_SP, sp); chk("SP lowered by m+1", sp, HEAP_BASE + SEMI_WORDS - 3);
    for (int k = 0; k < 3; k++) begin hr(int'(sp) + k, r); chk("slot nil", r, NIL); end
    hw(HW_HTOP, sp - 5);
    hw(HW_ARG_M, 8);
    call(FN_TEST_HEAP, res); chk("test_heap after GC", res, RES_OK); chk("one GC", n_gc, 1);
    hw(HW_ARG_M, SEMI_WORDS);
    call(FN_TEST_HEAP, res); chk("test_heap overflow", res, RES_OVERFLOW); chk("GC tried", n_gc, 2);
    // ---- send [1,2,3] to self ----
    for (int k = 0; k < 3; k++) begin
      hw(HEAP_BASE + 2*k, make_small(28'(k + 1)));
      hw(HEAP_BASE + 2*k + 1, (k == 2) ? NIL : (gaddr(H_SEG0, HEAP_BASE + 2*k + 2) | 32'd1));
    end
    hw(HW_HTOP, HEAP_BASE + 6);
    hw(HW_X0, make_pid(0)); hw(HW_X0 + 1, gaddr(H_SEG0, HEAP_BASE) | 32'd1);
    call(FN_SEND, res); chk("send ok", res, RES_OK);
    chk("Q head", qm(QW_HEAD), Q_BASE); chk("Q tail", qm(QW_TAIL), Q_BASE);
    chk("Q save", qm(QW_SAVE), Q_BASE); chk("Q top", qm(QW_TOP), Q_BASE + 3 + 6);
    chk("record next", qm(Q_BASE), 0);
    chk("record term", qm(Q_BASE + 1), gaddr(Q_SEG0, Q_BASE + 3) | 32'd1);
    chk("record size", qm(Q_BASE + 2), 6);
    chk("mini heap car", qm(Q_BASE + 3), make_small(1));
    chk("mini heap cdr", qm(Q_BASE + 4), gaddr(Q_SEG0, Q_BASE + 5) | 32'd1);
    // ---- receive it ----
    call(FN_RECEIVE, res); chk("receive ok", res, RES_OK);
    hr(HW_X0, p);
    chk("x0 in heap", p, gaddr(H_SEG0, HEAP_BASE + 6) | 32'd1);
    cur = p;
    for (int k = 0; k < 3; k++) begin
      hr(int'(widx_of(cur)), r); chk("list value", r, make_small(28'(k + 1)));
      hr(int'(widx_of(cur)) + 1, cur);
    end
    chk("list end", cur, NIL);
    hr(HW_HTOP, r); chk("heap top", r, HEAP_BASE + 12);
    // ---- second message, save_message, remove_message ----
    hw(HW_X0, make_pid(0)); hw(HW_X0 + 1, make_small(55));
    call(FN_SEND, res);
    chk("second record linked", qm(Q_BASE), Q_BASE + 9);
    chk("tail moved", qm(QW_TAIL), Q_BASE + 9);
    call(FN_SAVE, res); chk("save ok", res, RES_OK);
    chk("save points at second", qm(QW_SAVE), Q_BASE + 9);
    chk("prev is first", qm(QW_PREV), Q_BASE);
    call(FN_RECEIVE, res); hr(HW_X0, r); chk("second message", r, make_small(55));
    call(FN_REMOVE, res); chk("remove ok", res, RES_OK);
    chk("tail back to first", qm(QW_TAIL), Q_BASE);
    chk("save reset to head", qm(QW_SAVE), Q_BASE);
    call(FN_SAVE, res);
    chk("save at end", qm(QW_SAVE), 0);
    call(FN_RECEIVE, res); chk("nothing left to examine", res, RES_NONE);
    call(FN_REMOVE, res); chk("remove with nothing current", res, RES_NONE);
    // a message arriving now becomes current
    hw(HW_X0, make_pid(0)); hw(HW_X0 + 1, make_small(66));
    call(FN_SEND, res);
    call(FN_RECEIVE, res); hr(HW_X0, r); chk("late message", r, make_small(66));
    chk("late message is current", qm(QW_SAVE), Q_BASE + 12);
    chk("its predecessor recorded", qm(QW_PREV), Q_BASE);
    call(FN_REMOVE, res);
    chk("predecessor unlinked from it", qm(Q_BASE), 0);
    chk("tail back", qm(QW_TAIL), Q_BASE);
    // ---- enqueue lock during a receive ----
    hw(HW_X0, make_pid(0)); hw(HW_X0 + 1, make_small(77));
    fork
      call(FN_RECEIVE, res);
      begin repeat (3) @(negedge clk); tb_enq_set = 1; @(negedge clk); tb_enq_set = 0; end
    join
    chk("receive ok under lock", res, RES_OK);
    repeat (3) @(negedge clk);
    chk("permission after receive", rdy, 1);
    @(negedge clk); enq_clr = 1; @(negedge clk); enq_clr = 0;   // that sender went away
    repeat (2) @(negedge clk);
    call(FN_REMOVE, res);
    call(FN_REMOVE, res);
    chk("queue empty", qm(QW_HEAD), 0);
    chk("queue top reset", qm(QW_TOP), Q_BASE);
    // ---- wait_timeout ----
    hw(HW_ARG_M, 40);
    c0 = cycle;
    call(FN_WAIT, res);
    chk("timed out", res, RES_NONE);
    checks++;
    if (cycle - c0 < 40) begin failures++; $display("FAIL waited only %0d cycles", cycle - c0); end
    chk("no enqueue permission while queue busy", lock_viol, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
