// dm_top: distributed memory system for process circuits synthesized from
// Erlang.
//
// Each of the NPROC process nodes has its own heap/stack memory H_i and its
// own message-queue memory Q_i (both single-port), a library module L_i and
// an I/O module. Process modules run on their own H_i in parallel; only
// message passing and garbage collection leave the node:
//   * the Q-bus carries a sender's enqueue into the destination's Q_j,
//   * the H-bus carries the shared GC module's accesses to the H_i it cleans,
//   * the arbiter lets one send at a time onto the Q-bus and one process at a
//     time use the GC module, by fixed priority (lower index first).
// A send and a collection can run at the same time. This structure (one
// memory pair per process, two buses, one arbiter, one shared GC, I/O
// modules for memory-mapped control) is the document's; NPROC = 2 follows
// its example system with processes P0 and P1.
//
// The process modules themselves are circuits generated per application;
// each comes in through the port p_req[i]/p_rdata[i]: it reaches H_i
// (segment H_SEG0+i) and its I/O module (segment IO_SEG0+i, RUN at word 0).
// Read data returns one cycle after a read request. The Erlang port
// modules and their byte buffers of the example are not part of this RTL.
module dm_top
  import dm_pkg::*;
#(
  parameter int NPROC = 2,
  parameter int PW    = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mreq_t              p_req   [NPROC],
  output word_t              p_rdata [NPROC],
  // observation
  output logic [NPROC-1:0]   lib_busy,
  output logic               gc_active,
  output logic [PW-1:0]      gc_process,
  output logic               gc_overflow,
  output logic               send_active,
  output logic [PW-1:0]      send_src,
  output logic [PW-1:0]      send_dst
);
  // node <-> bus
  mreq_t h_m   [NPROC+1];   // last master: GC module
  word_t h_mrd [NPROC+1];
  mreq_t q_m   [NPROC];
  word_t q_mrd [NPROC];
  // bus <-> memories
  logic  hm_en [NPROC], hm_we [NPROC], qm_en [NPROC], qm_we [NPROC];
  widx_t hm_a  [NPROC], qm_a  [NPROC];
  word_t hm_wd [NPROC], hm_rd [NPROC], qm_wd [NPROC], qm_rd [NPROC];

  // arbitration flags
  logic [NPROC-1:0] f_gc, f_sreq, f_ack, f_enq, f_rdy;
  logic [PW-1:0]    f_to [NPROC];
  logic [NPROC-1:0] s_gcclr, s_ackset, s_ackclr, s_enqset, s_enqclr;
  logic             gc_req, gc_done;

  for (genvar i = 0; i < NPROC; i++) begin : g_node
    mreq_t l_h, l_q;
    word_t l_hrd, l_qrd;
    fn_e   run;
    logic  q_busy;

    dm_io #(.IDX(i), .PW(PW)) u_io (
      .clk, .rst_n,
      .p_req(p_req[i]), .p_rdata(p_rdata[i]),
      .l_req(l_h), .l_rdata(l_hrd), .lq_req(l_q), .lq_rdata(l_qrd),
      .h_dn(h_m[i]), .h_dn_rdata(h_mrd[i]), .q_dn(q_m[i]), .q_dn_rdata(q_mrd[i]),
      .gc_clr(s_gcclr[i]), .ack_set(s_ackset[i]), .ack_clr(s_ackclr[i]),
      .enq_set(s_enqset[i]), .enq_clr(s_enqclr[i]), .q_busy(q_busy),
      .run(run), .gc_req(f_gc[i]), .send_req(f_sreq[i]), .send_to(f_to[i]),
      .send_ack(f_ack[i]), .enq_req(f_enq[i]), .enq_ready(f_rdy[i])
    );

    dm_lib #(.IDX(i), .PW(PW)) u_lib (
      .clk, .rst_n,
      .h_req(l_h), .h_rdata(l_hrd), .q_req(l_q), .q_rdata(l_qrd),
      .run(run), .gc_req_flag(f_gc[i]), .send_ack(f_ack[i]),
      .enq_req(f_enq[i]), .enq_ready(f_rdy[i]), .q_busy(q_busy),
      .busy(lib_busy[i])
    );

    dm_spram u_h (.clk, .en(hm_en[i]), .we(hm_we[i]), .addr(hm_a[i]),
                  .wdata(hm_wd[i]), .rdata(hm_rd[i]));
    dm_spram u_q (.clk, .en(qm_en[i]), .we(qm_we[i]), .addr(qm_a[i]),
                  .wdata(qm_wd[i]), .rdata(qm_rd[i]));
  end

  dm_bus #(.N(NPROC), .NX(1), .SEG0(H_SEG0)) u_hbus (
    .clk, .rst_n, .m_req(h_m), .m_rdata(h_mrd),
    .mem_en(hm_en), .mem_we(hm_we), .mem_addr(hm_a), .mem_wdata(hm_wd), .mem_rdata(hm_rd)
  );

  dm_bus #(.N(NPROC), .NX(0), .SEG0(Q_SEG0)) u_qbus (
    .clk, .rst_n, .m_req(q_m), .m_rdata(q_mrd),
    .mem_en(qm_en), .mem_we(qm_we), .mem_addr(qm_a), .mem_wdata(qm_wd), .mem_rdata(qm_rd)
  );

  dm_arbiter #(.N(NPROC), .PW(PW)) u_arb (
    .clk, .rst_n,
    .gc_req_i(f_gc), .send_req_i(f_sreq), .send_to_i(f_to), .enq_ready_i(f_rdy),
    .gc_clr(s_gcclr), .ack_set(s_ackset), .ack_clr(s_ackclr),
    .enq_set(s_enqset), .enq_clr(s_enqclr),
    .gc_req(gc_req), .gc_process(gc_process), .gc_done(gc_done),
    .send_busy(send_active), .send_src(send_src), .send_dst(send_dst)
  );

  dm_gc #(.N(NPROC), .PW(PW)) u_gc (
    .clk, .rst_n, .gc_req(gc_req), .gc_process(gc_process), .gc_done(gc_done),
    .overflow(gc_overflow), .m_req(h_m[NPROC]), .m_rdata(h_mrd[NPROC])
  );

  assign gc_active = gc_req;
endmodule
