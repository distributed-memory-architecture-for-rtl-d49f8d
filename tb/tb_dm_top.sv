// tb_dm_top: end-to-end test of the distributed memory system at its
// default size (two process nodes).
//
// The testbench plays the two process modules: through p_req[i] it writes
// terms into H_i, writes arguments and a function number into RUN, polls RUN
// until the library module has finished and checks the result words and
// the terms it finds in memory. Expected values are built here from the term
// encoding, independently of the RTL. It exercises send and receive of a
// nested tuple/list term, remove_message, save_message, two simultaneous
// sends (arbitration), wait_timeout ending by timeout and by an arriving
// message, allocate, garbage collection with x-register and stack roots,
// a collection overlapping a send, and a heap overflow; each of these is
// counted and must happen at least once.
module tb_dm_top;
  import dm_pkg::*;

  localparam int NP = 2;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  mreq_t p_req [NP];
  word_t p_rdata [NP];
  logic [NP-1:0] lib_busy;
  logic  gc_active, gc_overflow, send_active;
  logic  gc_process, send_src, send_dst;

  dm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_send = 0, n_gc = 0, n_conflict = 0, n_overlap = 0;
  int n_timeout = 0, n_wake = 0, n_overflow = 0, n_save = 0, n_alloc = 0, n_remove = 0;

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- process-side bus access ----
  task automatic acc(input int i, input logic we, input word_t a, input word_t d,
                     output word_t r);
    @(negedge clk);
    p_req[i] = '{req: 1'b1, we: we, addr: a, wdata: d};
    @(negedge clk);
    p_req[i] = MREQ_IDLE;
    r = p_rdata[i];
  endtask
  task automatic hw(input int i, input int w, input word_t d);
    word_t r;
    acc(i, 1'b1, gaddr(H_SEG0 + i, w), d, r);
  endtask
  task automatic hr(input int i, input int w, output word_t r);
    acc(i, 1'b0, gaddr(H_SEG0 + i, w), '0, r);
  endtask
  function automatic word_t hptr(input int i, input int w, input logic [1:0] tag);
    return gaddr(H_SEG0 + i, w) | word_t'(tag);
  endfunction

  // call a library function and return its result code
  task automatic call(input int i, input fn_e f, output word_t res);
    word_t r;
    acc(i, 1'b1, gaddr(IO_SEG0 + i, IO_RUN), word_t'(f), r);
    do acc(i, 1'b0, gaddr(IO_SEG0 + i, IO_RUN), '0, r); while (r != '0);
    hr(i, HW_RESULT, res);
  endtask

  task automatic init_node(input int i);
    hw(i, HW_SPACE, 0);
    hw(i, HW_HTOP, HEAP_BASE);
    hw(i, HW_SP, HEAP_BASE + SEMI_WORDS);
  endtask

  // build a list of small integers v0, v0+1, ... at the heap top; returns the pointer
  task automatic build_list(input int i, input int len, input int v0, output word_t p);
    word_t top;
    hr(i, HW_HTOP, top);
    for (int k = 0; k < len; k++) begin
      hw(i, int'(top) + 2*k, make_small(28'(v0 + k)));
      hw(i, int'(top) + 2*k + 1, (k == len - 1) ? NIL : hptr(i, int'(top) + 2*k + 2, TAG_LIST));
    end
    hw(i, HW_HTOP, top + word_t'(2*len));
    p = hptr(i, int'(top), TAG_LIST);
  endtask

  // walk a list in H_i and compare it with v0, v0+1, ...
  task automatic check_list(input int i, input string what, input word_t p, input int len, input int v0);
    word_t car, cur;
    cur = p;
    for (int k = 0; k < len; k++) begin
      checks++;
      if (cur[1:0] != TAG_LIST || int'(seg_of(cur)) != H_SEG0 + i) begin
        failures++;
        $display("FAIL %s: element %0d pointer %h", what, k, cur);
        return;
      end
      hr(i, int'(widx_of(cur)), car);
      check(what, car, make_small(28'(v0 + k)));
      hr(i, int'(widx_of(cur)) + 1, cur);
    end
    check({what, " end"}, cur, NIL);
  endtask

  // ---- mechanism monitors ----
  longint cycle = 0;
  always @(posedge clk) cycle++;
  always @(posedge clk) if (rst_n) begin
    if (|dut.s_ackset) n_send++;
    if (dut.gc_done) n_gc++;
    if (dut.f_sreq == 2'b11 && !dut.send_active) n_conflict++;
    if (gc_active && send_active && dut.gc_process == dut.send_dst) n_overlap++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    word_t res, r, p, q, t0;
    longint c0, c1;
    for (int i = 0; i < NP; i++) p_req[i] = MREQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NP; i++) init_node(i);

    // ---- 1. send {7, [10,11,12]} from P1 to P0, receive it ----
    build_list(1, 3, 10, p);
    hr(1, HW_HTOP, r);
    hw(1, int'(r), word_t'(2) << 6);           // tuple header, arity 2
    hw(1, int'(r) + 1, make_small(7));
    hw(1, int'(r) + 2, p);
    hw(1, HW_HTOP, r + 3);
    hw(1, HW_X0, make_pid(0));
    hw(1, HW_X0 + 1, hptr(1, int'(r), TAG_BOXED));
    call(1, FN_SEND, res);
    check("send result", res, RES_OK);
    call(0, FN_RECEIVE, res);
    check("receive result", res, RES_OK);
    hr(0, HW_X0, q);
    check("received tag", word_t'(q[1:0]), word_t'(TAG_BOXED));
    check("received in H0", word_t'(seg_of(q)), word_t'(H_SEG0 + 0));
    hr(0, int'(widx_of(q)), r);
    check("tuple header", r, word_t'(2) << 6);
    hr(0, int'(widx_of(q)) + 1, r);
    check("tuple element 1", r, make_small(7));
    hr(0, int'(widx_of(q)) + 2, r);
    check_list(0, "tuple element 2", r, 3, 10);
    hr(0, HW_HTOP, r);
    check("H0 heap top after receive", r, word_t'(HEAP_BASE + 3 + 6));
    call(0, FN_REMOVE, res);
    check("remove result", res, RES_OK);
    n_remove++;
    call(0, FN_RECEIVE, res);
    check("receive on empty queue", res, RES_NONE);

    // ---- 2. simultaneous sends in both directions ----
    hw(0, HW_X0, make_pid(1)); hw(0, HW_X0 + 1, make_small(5));
    hw(1, HW_X0, make_pid(0)); hw(1, HW_X0 + 1, make_small(6));
    fork
      begin word_t a; call(0, FN_SEND, a); check("send 0->1", a, RES_OK); end
      begin word_t b; call(1, FN_SEND, b); check("send 1->0", b, RES_OK); end
    join
    call(1, FN_RECEIVE, res); check("P1 receive", res, RES_OK);
    hr(1, HW_X0, r); check("P1 got 5", r, make_small(5));
    call(0, FN_RECEIVE, res); check("P0 receive", res, RES_OK);
    hr(0, HW_X0, r); check("P0 got 6", r, make_small(6));
    call(1, FN_REMOVE, res); call(0, FN_REMOVE, res);
    n_remove += 2;

    // ---- 3. save_message: skip the first message, take the second ----
    hw(0, HW_X0, make_pid(1)); hw(0, HW_X0 + 1, make_small(100));
    call(0, FN_SEND, res);
    hw(0, HW_X0 + 1, make_small(101));
    call(0, FN_SEND, res);
    call(1, FN_RECEIVE, res); hr(1, HW_X0, r); check("first message", r, make_small(100));
    call(1, FN_SAVE, res); check("save result", res, RES_OK);
    n_save++;
    call(1, FN_RECEIVE, res); hr(1, HW_X0, r); check("second message", r, make_small(101));
    call(1, FN_REMOVE, res); n_remove++;
    call(1, FN_RECEIVE, res); hr(1, HW_X0, r); check("back to first", r, make_small(100));
    call(1, FN_REMOVE, res);
    call(1, FN_RECEIVE, res); check("queue empty again", res, RES_NONE);

    // ---- 4. wait_timeout: by timeout, then woken by a send ----
    hw(0, HW_ARG_M, 60);
    c0 = cycle;
    call(0, FN_WAIT, res);
    c1 = cycle;
    check("wait timed out", res, RES_NONE);
    checks++;
    if (c1 - c0 < 60) begin failures++; $display("FAIL timeout after %0d cycles", c1 - c0); end
    if (res == RES_NONE) n_timeout++;
    hw(0, HW_ARG_M, 100000);
    hw(1, HW_X0, make_pid(0)); hw(1, HW_X0 + 1, make_small(42));
    fork
      begin word_t a; call(0, FN_WAIT, a); check("woken by message", a, RES_OK); if (a == RES_OK) n_wake++; end
      begin word_t b; repeat (100) @(posedge clk); call(1, FN_SEND, b); end
    join
    call(0, FN_RECEIVE, res); hr(0, HW_X0, r); check("woken message", r, make_small(42));
    call(0, FN_REMOVE, res);

    // ---- 5. allocate and GC with x and stack roots on P0 ----
    build_list(0, 5, 200, p);                  // live through x[0]
    build_list(0, 4, 300, q);                  // live through a stack slot
    build_list(0, 50, 900, t0);                // garbage
    hw(0, HW_ARG_M, 3);
    hr(0, HW_SP, r);
    call(0, FN_ALLOCATE, res);
    check("allocate result", res, RES_OK);
    hr(0, HW_SP, t0);
    check("allocate moves SP", t0, r - 4);
    hr(0, int'(t0) + 2, r);
    check("new stack slot is nil", r, NIL);
    n_alloc++;
    hw(0, int'(t0) + 1, q);                    // stack slot holds the second list
    hw(0, HW_X0, p);
    hw(0, HW_ARG_N, 1);
    hw(0, HW_HTOP, HEAP_BASE + SEMI_WORDS - 40);  // heap nearly full (garbage)
    hw(0, HW_ARG_M, 100);
    call(0, FN_TEST_HEAP, res);
    check("test_heap after GC", res, RES_OK);
    hr(0, HW_SPACE, r);  check("space flipped", r, 1);
    hr(0, HW_HTOP, r);   check("live words after GC", r, word_t'(semi_base(1) + 10 + 8));
    hr(0, HW_SP, t0);    check("stack moved", t0, word_t'(semi_base(1) + SEMI_WORDS - 4));
    hr(0, HW_X0, p);     check_list(0, "x root after GC", p, 5, 200);
    hr(0, int'(t0) + 1, q); check_list(0, "stack root after GC", q, 4, 300);

    // ---- 6. GC of H1 overlapping a send into Q1 ----
    build_list(1, 200, 1000, p);
    hw(1, HW_X0, p);
    hw(1, HW_ARG_N, 1);
    hw(1, HW_HTOP, HEAP_BASE + SEMI_WORDS - 10);
    hw(1, HW_ARG_M, 50);
    hw(0, HW_X0, make_pid(1)); hw(0, HW_X0 + 1, make_small(77));
    fork
      begin word_t a; call(1, FN_TEST_HEAP, a); check("P1 test_heap with GC", a, RES_OK); end
      begin word_t b; repeat (30) @(posedge clk); call(0, FN_SEND, b); check("send during GC", b, RES_OK); end
    join
    hr(1, HW_X0, p); check_list(1, "P1 list after GC", p, 200, 1000);
    call(1, FN_RECEIVE, res); hr(1, HW_X0, r); check("message sent during GC", r, make_small(77));
    call(1, FN_REMOVE, res);

    // ---- 7. heap overflow: more than a semispace requested ----
    hw(0, HW_ARG_M, SEMI_WORDS + 1);
    hw(0, HW_ARG_N, 1);
    call(0, FN_TEST_HEAP, res);
    check("overflow reported", res, RES_OVERFLOW);
    if (res == RES_OVERFLOW) n_overflow++;

    // ---- mechanisms ----
    $display("sends=%0d gcs=%0d send_conflicts=%0d gc_send_overlap=%0d timeouts=%0d wakes=%0d saves=%0d removes=%0d allocates=%0d overflows=%0d",
             n_send, n_gc, n_conflict, n_overlap, n_timeout, n_wake, n_save, n_remove, n_alloc, n_overflow);
    if (n_send == 0)     begin failures++; $display("FAIL no send"); end
    if (n_gc == 0)       begin failures++; $display("FAIL no GC"); end
    if (n_conflict == 0) begin failures++; $display("FAIL no simultaneous send requests"); end
    if (n_overlap == 0)  begin failures++; $display("FAIL no GC overlapping a send"); end
    if (n_timeout == 0)  begin failures++; $display("FAIL no timeout"); end
    if (n_wake == 0)     begin failures++; $display("FAIL no wake-up"); end
    if (n_save == 0)     begin failures++; $display("FAIL no save_message"); end
    if (n_remove == 0)   begin failures++; $display("FAIL no remove_message"); end
    if (n_alloc == 0)    begin failures++; $display("FAIL no allocate"); end
    if (n_overflow == 0) begin failures++; $display("FAIL no overflow"); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
