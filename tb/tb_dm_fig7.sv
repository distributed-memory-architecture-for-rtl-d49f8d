// tb_dm_fig7: the system with four process nodes, driven through the three
// situations the architecture is built for:
//   (a) P0 and P1 compute on their own heaps while L2 and L3 receive from
//       their own queues, all at the same time;
//   (b) L2 sends a list to P1 over the Q-bus while P0 and P1 keep computing
//       and L3 receives;
//   (c) the GC cleans H1 over the H-bus while L2 sends to P1 and L3 receives.
// The testbench plays the four process modules. It counts the cycles in
// which the named activities overlap and fails if any situation never
// showed its parallelism, and it checks every transferred term and the
// heap of P1 after its collection.
module tb_dm_fig7;
  import dm_pkg::*;

  localparam int NP = 4;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  mreq_t p_req [NP];
  word_t p_rdata [NP];
  logic [NP-1:0] lib_busy;
  logic  gc_active, gc_overflow, send_active;
  logic [1:0] gc_process, send_src, send_dst;

  dm_top #(.NPROC(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ov_local = 0, ov_local_recv = 0, ov_send_local = 0, ov_gc_send = 0, ov_gc_send_recv = 0;

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
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
  task automatic build_list(input int i, input int len, input int v0, output word_t p);
    word_t top;
    hr(i, HW_HTOP, top);
    for (int k = 0; k < len; k++) begin
      hw(i, int'(top) + 2*k, make_small(28'(v0 + k)));
      hw(i, int'(top) + 2*k + 1, (k == len - 1) ? NIL :
         (gaddr(H_SEG0 + i, int'(top) + 2*k + 2) | word_t'(TAG_LIST)));
    end
    hw(i, HW_HTOP, top + word_t'(2*len));
    p = gaddr(H_SEG0 + i, int'(top)) | word_t'(TAG_LIST);
  endtask
  task automatic check_list(input int i, input string what, input word_t p, input int len, input int v0);
    word_t car, cur;
    cur = p;
    for (int k = 0; k < len; k++) begin
      checks++;
      if (cur[1:0] != TAG_LIST || int'(seg_of(cur)) != H_SEG0 + i) begin
        failures++; $display("FAIL %s: element %0d pointer %h", what, k, cur); return;
      end
      hr(i, int'(widx_of(cur)), car);
      check(what, car, make_small(28'(v0 + k)));
      hr(i, int'(widx_of(cur)) + 1, cur);
    end
    check({what, " end"}, cur, NIL);
  endtask
  // local computation of P_i: a running sum kept in its heap
  task automatic compute(input int i, input int n);
    word_t r;
    for (int k = 0; k < n; k++) begin
      hr(i, HEAP_BASE + 1000, r);
      hw(i, HEAP_BASE + 1000, r + 1);
    end
  endtask
  // send a list of len values to process j, n_msgs times
  task automatic send_lists(input int i, input int j, input int len, input int v0);
    word_t p, res;
    build_list(i, len, v0, p);
    hw(i, HW_X0, make_pid(j));
    hw(i, HW_X0 + 1, p);
    call(i, FN_SEND, res);
    check("send", res, RES_OK);
  endtask
  // receive one list, check it and remove it
  task automatic recv_list(input int i, input int len, input int v0);
    word_t res, p;
    call(i, FN_RECEIVE, res);
    check("receive", res, RES_OK);
    hr(i, HW_X0, p);
    check_list(i, "received list", p, len, v0);
    call(i, FN_REMOVE, res);
  endtask

  logic p_local [NP];
  always_comb for (int i = 0; i < NP; i++)
    p_local[i] = p_req[i].req && int'(seg_of(p_req[i].addr)) == H_SEG0 + i;

  always @(posedge clk) if (rst_n) begin
    if (p_local[0] && p_local[1]) ov_local++;
    if (p_local[0] && p_local[1] && lib_busy[2] && lib_busy[3]) ov_local_recv++;
    if (send_active && send_src == 2 && send_dst == 1 && (p_local[0] || p_local[1]) && lib_busy[3]) ov_send_local++;
    if (gc_active && gc_process == 1 && send_active && send_dst == 1) ov_gc_send++;
    if (gc_active && gc_process == 1 && send_active && send_dst == 1 && lib_busy[3]) ov_gc_send_recv++;
  end

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    word_t res, p;
    for (int i = 0; i < NP; i++) p_req[i] = MREQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NP; i++) init_node(i);
    for (int i = 0; i < NP; i++) hw(i, HEAP_BASE + 1000, 0);
    for (int i = 0; i < NP; i++) hw(i, HW_HTOP, HEAP_BASE + 1001);
    // fill the queues of P2 and P3 (from P0)
    for (int k = 0; k < 3; k++) begin
      send_lists(0, 2, 30, 100 * k);
      send_lists(0, 3, 30, 100 * k + 50);
    end

    // (a) local work of P0, P1 in parallel with receives by L2, L3
    fork
      compute(0, 300);
      compute(1, 300);
      recv_list(2, 30, 0);
      recv_list(3, 30, 50);
    join

    // (b) L2 sends to P1 while P0, P1 compute and L3 receives
    fork
      compute(0, 400);
      compute(1, 400);
      send_lists(2, 1, 60, 7000);
      begin repeat (20) @(posedge clk); recv_list(3, 30, 150); end
    join
    recv_list(1, 60, 7000);

    // (c) GC on H1 while L2 sends to P1 and L3 receives, P0 computes
    build_list(1, 300, 2000, p);
    hw(1, HW_X0, p);
    hw(1, HW_ARG_N, 1);
    hw(1, HW_HTOP, HEAP_BASE + SEMI_WORDS - 20);
    hw(1, HW_ARG_M, 100);
    fork
      compute(0, 400);
      begin call(1, FN_TEST_HEAP, res); check("P1 test_heap with GC", res, RES_OK); end
      begin repeat (40) @(posedge clk); send_lists(2, 1, 20, 9000); end
      begin repeat (40) @(posedge clk); recv_list(3, 30, 250); end
    join
    hr(1, HW_SPACE, res); check("H1 switched semispace", res, 1);
    hr(1, HW_X0, p); check_list(1, "P1 live list after GC", p, 300, 2000);
    recv_list(1, 20, 9000);
    hr(0, HEAP_BASE + 1000, res); check("P0 local sum", res, 1100);

    $display("overlap cycles: P0|P1 local=%0d local+2 receives=%0d send+local+receive=%0d gc+send=%0d gc+send+receive=%0d",
             ov_local, ov_local_recv, ov_send_local, ov_gc_send, ov_gc_send_recv);
    checks += 5;
    if (ov_local == 0)        begin failures++; $display("FAIL P0, P1 never ran in parallel"); end
    if (ov_local_recv == 0)   begin failures++; $display("FAIL no local work beside two receives"); end
    if (ov_send_local == 0)   begin failures++; $display("FAIL no send beside local work and a receive"); end
    if (ov_gc_send == 0)      begin failures++; $display("FAIL no GC beside a send to the same process"); end
    if (ov_gc_send_recv == 0) begin failures++; $display("FAIL no GC beside a send and a receive"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
