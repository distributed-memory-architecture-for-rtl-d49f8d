// tb_dm_arbiter: drives the arbiter with request flags kept by a small
// model of the I/O-module registers and checks the GC and send handshakes:
// fixed priority between simultaneous requests, one collection and one send
// at a time, the grant only after the destination's enqueue permission, the
// release after the sender drops its request, and a collection running
// alongside a send.
module tb_dm_arbiter;
  import dm_pkg::*;
  localparam int N = 3, PW = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] gc_req_i = '0, send_req_i = '0, enq_ready_i = '0;
  logic [PW-1:0] send_to_i [N];
  logic [N-1:0] gc_clr, ack_set, ack_clr, enq_set, enq_clr;
  logic gc_req, gc_done = 1'b0, send_busy;
  logic [PW-1:0] gc_process, send_src, send_dst;
  logic [N-1:0] ack = '0, enq = '0;
  int checks = 0, failures = 0;

  dm_arbiter #(.N(N), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  // register model of the I/O modules
  always @(posedge clk) begin
    gc_req_i <= gc_req_i & ~gc_clr;
    ack <= (ack | ack_set) & ~ack_clr;
    enq <= (enq | enq_set) & ~enq_clr;
    enq_ready_i <= enq_ready_i & enq;   // permission falls with the request
  end

  task automatic chk(input string w, input int g, input int e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: %0d vs %0d", w, g, e); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) send_to_i[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // ---- GC: processes 2 and 1 ask together; 1 goes first ----
    @(negedge clk);
    gc_req_i[2] = 1'b1; gc_req_i[1] = 1'b1;
    @(negedge clk);
    chk("gc_req raised", gc_req, 1);
    chk("priority picks 1", gc_process, 1);
    repeat (5) @(negedge clk);
    chk("still collecting 1", gc_process, 1);
    chk("GC_req_1 held", gc_req_i[1], 1);
    gc_done = 1'b1; @(negedge clk); gc_done = 1'b0;
    chk("gc_req dropped", gc_req, 0);
    @(negedge clk);
    chk("GC_req_1 cleared", gc_req_i[1], 0);
    chk("GC_req_2 waiting", gc_req_i[2], 1);
    repeat (2) @(negedge clk);
    chk("then 2", gc_process, 2);
    chk("gc_req for 2", gc_req, 1);
    // ---- send while GC of 2 runs: 0 -> 2 and 1 -> 0 together; 0 first ----
    send_to_i[0] = 2'd2; send_to_i[1] = 2'd0;
    send_req_i[0] = 1'b1; send_req_i[1] = 1'b1;
    @(negedge clk);
    chk("send busy", send_busy, 1);
    @(negedge clk);
    chk("enq_req to 2", enq[2], 1);
    chk("no enq_req to 0 yet", enq[0], 0);
    repeat (4) @(negedge clk);
    chk("no grant before permission", ack[0], 0);
    enq_ready_i[2] = 1'b1;
    repeat (2) @(negedge clk);
    chk("grant to 0", ack[0], 1);
    chk("no grant to 1", ack[1], 0);
    chk("GC still running", gc_req, 1);
    send_req_i[0] = 1'b0;                       // sender finished
    repeat (2) @(negedge clk);
    chk("grant withdrawn", ack[0], 0);
    chk("enq_req withdrawn", enq[2], 0);
    repeat (4) @(negedge clk);
    chk("next send to 0", enq[0], 1);
    chk("send source 1", send_src, 1);
    enq_ready_i[0] = 1'b1;
    repeat (2) @(negedge clk);
    chk("grant to 1", ack[1], 1);
    gc_done = 1'b1; @(negedge clk); gc_done = 1'b0;
    send_req_i[1] = 1'b0;
    repeat (6) @(negedge clk);
    chk("all idle: send", send_busy, 0);
    chk("all idle: gc", gc_req, 0);
    chk("flags clear", int'({ack, enq, gc_req_i}), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
