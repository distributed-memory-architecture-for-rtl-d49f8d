// dm_io: I/O module of process node IDX. It puts the node's control and
// arbitration variables into the address space, so that the process module
// P_i and the library module L_i read and write them like memory, and it
// passes every other access on to the bus modules.
//
// Register window (segment IO_SEG0+IDX, word index):
//   0 RUN        r/w  function code for L_i (P_i writes 1..7, L_i writes 0)
//   1 GC_REQ     r/w  L_i writes 1 to ask for GC; the arbiter clears it
//   2 SEND_REQ   r/w  L_i writes 1 to ask for the Q-bus, 0 when done
//   3 SEND_TO    r/w  destination process of the send
//   4 SEND_ACK   r    set by the arbiter when the send may start
//   5 ENQ_REQ    r    set by the arbiter while someone wants to enqueue here
//   6 ENQ_READY  r    this node permits the enqueue
// ENQ_READY is answered here: it rises one cycle after ENQ_REQ when the
// library module is not inside receive, remove_message, save_message or a
// queue check of wait_timeout (q_busy low), and falls after ENQ_REQ falls.
// Memory-mapped access is the document's; the register numbering, the
// separate SEND_ACK grant flag and answering ENQ_READY in this module are
// this design's choices. The registers are also given to L_i and to the
// arbiter as plain wires.
//
// Ports: p_* is the process module's port, l_* the library module's H-side
// port, lq_* its Q-side port; h_dn/q_dn go to the H-bus and Q-bus modules.
// P_i and L_i never access memory at the same time (P_i waits while RUN is
// not 0), but P_i may poll RUN meanwhile; register reads from both ports in
// one cycle are served. All reads answer one cycle after the request.
module dm_io
  import dm_pkg::*;
#(
  parameter int IDX = 0,
  parameter int PW  = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mreq_t         p_req,
  output word_t         p_rdata,
  input  mreq_t         l_req,
  output word_t         l_rdata,
  input  mreq_t         lq_req,
  output word_t         lq_rdata,
  output mreq_t         h_dn,
  input  word_t         h_dn_rdata,
  output mreq_t         q_dn,
  input  word_t         q_dn_rdata,
  // arbiter strobes
  input  logic          gc_clr,
  input  logic          ack_set,
  input  logic          ack_clr,
  input  logic          enq_set,
  input  logic          enq_clr,
  // library module status
  input  logic          q_busy,
  // register values
  output fn_e           run,
  output logic          gc_req,
  output logic          send_req,
  output logic [PW-1:0] send_to,
  output logic          send_ack,
  output logic          enq_req,
  output logic          enq_ready
);
  logic  p_io, l_io;
  logic  p_io_q, l_io_q;
  word_t p_io_rd, l_io_rd;

  assign p_io = p_req.req && int'(seg_of(p_req.addr)) == IO_SEG0 + IDX;
  assign l_io = l_req.req && int'(seg_of(l_req.addr)) == IO_SEG0 + IDX;

  function automatic word_t reg_read(input widx_t w, input fn_e r, input logic g,
                                     input logic s, input logic [PW-1:0] t,
                                     input logic a, input logic e, input logic y);
    unique case (int'(w))
      IO_RUN:       return word_t'(r);
      IO_GC_REQ:    return word_t'(g);
      IO_SEND_REQ:  return word_t'(s);
      IO_SEND_TO:   return word_t'(t);
      IO_SEND_ACK:  return word_t'(a);
      IO_ENQ_REQ:   return word_t'(e);
      IO_ENQ_READY: return word_t'(y);
      default:      return '0;
    endcase
  endfunction

  // memory traffic goes on to the buses
  always_comb begin
    if (l_req.req && !l_io)      h_dn = l_req;
    else if (p_req.req && !p_io) h_dn = p_req;
    else                         h_dn = MREQ_IDLE;
    q_dn = lq_req;
  end
  assign lq_rdata = q_dn_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= FN_IDLE;
      gc_req    <= 1'b0;
      send_req  <= 1'b0;
      send_to   <= '0;
      send_ack  <= 1'b0;
      enq_req   <= 1'b0;
      enq_ready <= 1'b0;
      p_io_q    <= 1'b0;
      l_io_q    <= 1'b0;
      p_io_rd   <= '0;
      l_io_rd   <= '0;
    end else begin
      p_io_q  <= p_io && !p_req.we;
      l_io_q  <= l_io && !l_req.we;
      p_io_rd <= reg_read(widx_of(p_req.addr), run, gc_req, send_req, send_to,
                          send_ack, enq_req, enq_ready);
      l_io_rd <= reg_read(widx_of(l_req.addr), run, gc_req, send_req, send_to,
                          send_ack, enq_req, enq_ready);
      // writes from the process module, then the library module (wins)
      if (p_io && p_req.we && int'(widx_of(p_req.addr)) == IO_RUN)
        run <= fn_e'(p_req.wdata[2:0]);
      if (l_io && l_req.we) begin
        unique case (int'(widx_of(l_req.addr)))
          IO_RUN:      run      <= fn_e'(l_req.wdata[2:0]);
          IO_GC_REQ:   gc_req   <= l_req.wdata[0];
          IO_SEND_REQ: send_req <= l_req.wdata[0];
          IO_SEND_TO:  send_to  <= l_req.wdata[PW-1:0];
          default: ;
        endcase
      end
      // arbiter side
      if (gc_clr)  gc_req   <= 1'b0;
      if (ack_set) send_ack <= 1'b1;
      if (ack_clr) send_ack <= 1'b0;
      if (enq_set) enq_req  <= 1'b1;
      if (enq_clr) enq_req  <= 1'b0;
      // enqueue permission
      if (!enq_req)           enq_ready <= 1'b0;
      else if (!q_busy)       enq_ready <= 1'b1;
    end
  end

  assign p_rdata = p_io_q ? p_io_rd : h_dn_rdata;
  assign l_rdata = l_io_q ? l_io_rd : h_dn_rdata;

  always_ff @(posedge clk) begin
    if (rst_n)
      assert (!(l_req.req && !l_io && p_req.req && !p_io))
        else $error("dm_io: process and library module access memory together");
  end
endmodule
