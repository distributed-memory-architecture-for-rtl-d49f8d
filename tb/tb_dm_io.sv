// tb_dm_io: checks the memory-mapped register window of one I/O module
// (RUN written by the process and cleared by the library module, GC_REQ,
// SEND_REQ, SEND_TO written by the library module, arbiter set/clear
// strobes, read-back of every register one cycle after the request), the
// automatic enqueue permission with and without q_busy, and that ordinary
// memory accesses pass through to the H and Q buses with their answers.
module tb_dm_io;
  import dm_pkg::*;
  localparam int IDX = 1, PW = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  mreq_t p_req, l_req, lq_req, h_dn, q_dn;
  word_t p_rdata, l_rdata, lq_rdata, h_dn_rdata, q_dn_rdata;
  logic gc_clr = 0, ack_set = 0, ack_clr = 0, enq_set = 0, enq_clr = 0, q_busy = 0;
  fn_e run;
  logic gc_req, send_req, send_ack, enq_req, enq_ready;
  logic [PW-1:0] send_to;
  int checks = 0, failures = 0;

  dm_io #(.IDX(IDX), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  // downstream memories answer with a function of the address, one cycle later
  always @(posedge clk) begin
    h_dn_rdata <= h_dn.req ? (h_dn.addr ^ 32'h5555_0000) : 32'hDEAD;
    q_dn_rdata <= q_dn.req ? (q_dn.addr ^ 32'h0000_AAAA) : 32'hDEAD;
  end

  task automatic chk(input string w, input word_t g, input word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h vs %h", w, g, e); end
  endtask
  task automatic acc(input bit from_l, input logic we, input word_t a, input word_t d,
                     output word_t r);
    @(negedge clk);
    if (from_l) l_req = '{req: 1'b1, we: we, addr: a, wdata: d};
    else        p_req = '{req: 1'b1, we: we, addr: a, wdata: d};
    @(negedge clk);
    l_req = MREQ_IDLE; p_req = MREQ_IDLE;
    r = from_l ? l_rdata : p_rdata;
  endtask
  task automatic strobe(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0;
  endtask
  function automatic word_t io(input int w);
    return gaddr(IO_SEG0 + IDX, w);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t r;
    p_req = MREQ_IDLE; l_req = MREQ_IDLE; lq_req = MREQ_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    acc(0, 1, io(IO_RUN), 32'd4, r);
    chk("RUN wire", word_t'(run), 4);
    acc(0, 0, io(IO_RUN), '0, r);  chk("P reads RUN", r, 4);
    acc(1, 0, io(IO_RUN), '0, r);  chk("L reads RUN", r, 4);
    acc(1, 1, io(IO_RUN), '0, r);
    acc(0, 0, io(IO_RUN), '0, r);  chk("RUN cleared by L", r, 0);
    acc(1, 1, io(IO_GC_REQ), 1, r);
    chk("GC_REQ wire", word_t'(gc_req), 1);
    acc(0, 0, io(IO_GC_REQ), '0, r); chk("GC_REQ read", r, 1);
    strobe(gc_clr);
    chk("GC_REQ cleared by arbiter", word_t'(gc_req), 0);
    acc(1, 1, io(IO_SEND_TO), 2, r);
    acc(1, 1, io(IO_SEND_REQ), 1, r);
    chk("SEND_TO wire", word_t'(send_to), 2);
    chk("SEND_REQ wire", word_t'(send_req), 1);
    acc(1, 0, io(IO_SEND_TO), '0, r); chk("SEND_TO read", r, 2);
    strobe(ack_set);
    acc(1, 0, io(IO_SEND_ACK), '0, r); chk("SEND_ACK read", r, 1);
    acc(1, 1, io(IO_SEND_ACK), 0, r);
    chk("SEND_ACK not writable", word_t'(send_ack), 1);
    strobe(ack_clr);
    chk("SEND_ACK cleared", word_t'(send_ack), 0);
    // enqueue permission
    q_busy = 1'b1;
    strobe(enq_set);
    repeat (3) @(negedge clk);
    chk("ENQ_REQ set", word_t'(enq_req), 1);
    chk("no permission while busy", word_t'(enq_ready), 0);
    q_busy = 1'b0;
    @(negedge clk);
    chk("permission once free", word_t'(enq_ready), 1);
    acc(0, 0, io(IO_ENQ_READY), '0, r); chk("ENQ_READY read", r, 1);
    acc(0, 0, io(IO_ENQ_REQ), '0, r);   chk("ENQ_REQ read", r, 1);
    strobe(enq_clr);
    @(negedge clk);
    chk("permission withdrawn", word_t'(enq_ready), 0);
    // pass-through
    acc(0, 0, gaddr(H_SEG0 + IDX, 77), '0, r);
    chk("P memory read passes", r, gaddr(H_SEG0 + IDX, 77) ^ 32'h5555_0000);
    acc(1, 0, gaddr(H_SEG0 + 0, 12), '0, r);
    chk("L remote read passes", r, gaddr(H_SEG0 + 0, 12) ^ 32'h5555_0000);
    @(negedge clk);
    lq_req = '{req: 1'b1, we: 1'b0, addr: gaddr(Q_SEG0 + 3, 9), wdata: '0};
    @(negedge clk);
    lq_req = MREQ_IDLE;
    chk("Q read passes", lq_rdata, gaddr(Q_SEG0 + 3, 9) ^ 32'h0000_AAAA);
    // register accesses do not reach the bus
    @(negedge clk);
    p_req = '{req: 1'b1, we: 1'b0, addr: io(IO_RUN), wdata: '0};
    #1 chk("IO access stays off the bus", word_t'(h_dn.req), 0);
    @(negedge clk);
    p_req = MREQ_IDLE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
