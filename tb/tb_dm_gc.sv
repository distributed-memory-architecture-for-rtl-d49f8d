// tb_dm_gc: the collector working on one heap memory. The heap holds two
// live lists (one reached from x[0], one from a stack slot), a live tuple
// reached from x[1] that holds a third list, and garbage. After gc_req the
// test checks the flipped SPACE, the new heap top (exactly the live words),
// the moved stack pointer, that every root now points into the new region
// and that walking each structure gives the original values; then a second
// collection flips back. A list named by two roots must be copied once
// (forwarding), and the overflow flag is checked with objects that cannot be
// forwarded (empty tuples) and so outgrow the to-space.
module tb_dm_gc;
  import dm_pkg::*;
  localparam int N = 2, PW = 1, P = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gc_req = 1'b0, gc_done, overflow;
  logic [PW-1:0] gc_process = PW'(P);
  mreq_t m_req;
  word_t m_rdata;
  int checks = 0, failures = 0;
  word_t heap [LOCAL_WORDS];

  dm_gc #(.N(N), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  // the memory of process P, addressed over the H-bus
  always @(posedge clk) begin
    if (m_req.req && rst_n) begin
      if (int'(seg_of(m_req.addr)) != H_SEG0 + P) begin
        failures++; $display("FAIL access outside H%0d: %h", P, m_req.addr);
      end
      if (m_req.we) heap[widx_of(m_req.addr)] <= m_req.wdata;
      else m_rdata <= heap[widx_of(m_req.addr)];
    end
  end

  function automatic word_t ptr(input int w, input logic [1:0] tag);
    return gaddr(H_SEG0 + P, w) | word_t'(tag);
  endfunction
  task automatic chk(input string w, input word_t g, input word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h vs %h", w, g, e); end
  endtask
  function automatic int mk_list(inout int top, input int len, input int v0);
    int first = top;
    for (int k = 0; k < len; k++) begin
      heap[top] = make_small(28'(v0 + k));
      heap[top + 1] = (k == len - 1) ? NIL : ptr(top + 2, TAG_LIST);
      top += 2;
    end
    return first;
  endfunction
  task automatic walk(input string w, input word_t p, input int len, input int v0, input logic sp);
    word_t cur = p;
    for (int k = 0; k < len; k++) begin
      checks++;
      if (cur[1:0] != TAG_LIST || int'(widx_of(cur)) < semi_base(sp) ||
          int'(widx_of(cur)) >= semi_base(sp) + SEMI_WORDS) begin
        failures++; $display("FAIL %s: bad pointer %h", w, cur); return;
      end
      chk(w, heap[widx_of(cur)], make_small(28'(v0 + k)));
      cur = heap[widx_of(cur) + 1];
    end
    chk({w, " nil"}, cur, NIL);
  endtask
  task automatic collect(output int cycles);
    cycles = 0;
    @(negedge clk); gc_req = 1'b1;
    while (!gc_done) begin @(negedge clk); cycles++; end
    gc_req = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int top, a, b, c, g, tup, sp0, cyc;
    word_t t;
    for (int k = 0; k < LOCAL_WORDS; k++) heap[k] = '0;
    top = HEAP_BASE;
    g = mk_list(top, 30, 500);                   // garbage
    a = mk_list(top, 6, 100);                    // x[0]
    g = mk_list(top, 20, 600);                   // garbage
    b = mk_list(top, 4, 200);                    // stack slot
    c = mk_list(top, 3, 300);                    // inside the tuple
    tup = top;
    heap[top] = word_t'(2) << 6; heap[top + 1] = make_small(9); heap[top + 2] = ptr(c, TAG_LIST);
    top += 3;
    sp0 = HEAP_BASE + SEMI_WORDS - 3;
    heap[sp0] = make_small(1234);                // continuation value
    heap[sp0 + 1] = ptr(b, TAG_LIST);
    heap[sp0 + 2] = NIL;
    heap[HW_X0] = ptr(a, TAG_LIST);
    heap[HW_X0 + 1] = ptr(tup, TAG_BOXED);
    heap[HW_X0 + 2] = ptr(g, TAG_LIST);          // not live: n = 2
    heap[HW_HTOP] = word_t'(top);
    heap[HW_SP] = word_t'(sp0);
    heap[HW_SPACE] = 0;
    heap[HW_ARG_N] = 2;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    collect(cyc);
    $display("collection took %0d cycles", cyc);
    chk("space", heap[HW_SPACE], 1);
    chk("heap top", heap[HW_HTOP], word_t'(semi_base(1) + 12 + 8 + 6 + 3));
    chk("stack pointer", heap[HW_SP], word_t'(semi_base(1) + SEMI_WORDS - 3));
    chk("dead x[2] untouched", heap[HW_X0 + 2], ptr(g, TAG_LIST));
    chk("stack immediate", heap[semi_base(1) + SEMI_WORDS - 3], make_small(1234));
    chk("stack nil", heap[semi_base(1) + SEMI_WORDS - 1], NIL);
    walk("x0 list", heap[HW_X0], 6, 100, 1);
    walk("stack list", heap[semi_base(1) + SEMI_WORDS - 2], 4, 200, 1);
    t = heap[HW_X0 + 1];
    chk("tuple tag", word_t'(t[1:0]), word_t'(TAG_BOXED));
    chk("tuple header", heap[widx_of(t)], word_t'(2) << 6);
    chk("tuple field", heap[widx_of(t) + 1], make_small(9));
    walk("tuple list", heap[widx_of(t) + 2], 3, 300, 1);
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow flagged"); end

    // second collection flips back
    collect(cyc);
    chk("space back", heap[HW_SPACE], 0);
    chk("heap top back", heap[HW_HTOP], word_t'(semi_base(0) + 29));
    walk("x0 list again", heap[HW_X0], 6, 100, 0);

    // sharing: a 20-cell list named by x[0] and x[1] is copied once, and
    // both registers get the same new pointer
    top = semi_base(0) + 29;
    a = mk_list(top, 20, 700);
    heap[HW_X0] = ptr(a, TAG_LIST);
    heap[HW_X0 + 1] = ptr(a, TAG_LIST);
    heap[HW_HTOP] = word_t'(top);
    heap[HW_ARG_N] = 2;
    collect(cyc);
    chk("shared: space", heap[HW_SPACE], 1);
    chk("shared: one copy", heap[HW_HTOP], word_t'(semi_base(1) + 8 + 40));
    chk("shared: same pointer", heap[HW_X0 + 1], heap[HW_X0]);
    walk("shared list", heap[HW_X0], 20, 700, 1);
    walk("stack list kept", heap[semi_base(1) + SEMI_WORDS - 2], 4, 200, 1);
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow flagged"); end

    // overflow: an empty tuple has no room for a forwarding pointer and is
    // copied once per reference; 60 cells naming one {} need 180 words in a
    // to-space that has only the 169 the from-space used
    top = semi_base(1) + 48;
    tup = top;
    heap[top++] = '0;                             // {}
    a = top;
    for (int k = 0; k < 60; k++) begin
      heap[top] = ptr(tup, TAG_BOXED);
      heap[top + 1] = (k == 59) ? NIL : ptr(top + 2, TAG_LIST);
      top += 2;
    end
    heap[HW_HTOP] = word_t'(top);
    heap[HW_SP] = word_t'(top);
    for (int k = top; k < semi_base(1) + SEMI_WORDS; k++) heap[k] = NIL;
    heap[HW_X0] = ptr(a, TAG_LIST);
    heap[HW_ARG_N] = 1;
    collect(cyc);
    chk("overflow flagged", word_t'(overflow), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
