// dm_arbiter: arbiter module. It serialises garbage collection (one process
// at a time on the shared GC module) and message sends (one send at a time
// on the Q-bus), choosing among waiting requests by fixed priority.
//
// The handshakes are the document's. The flags live in the I/O modules;
// the arbiter reads them and changes them through one-cycle set/clear
// strobes.
//   GC:   L_i raises GC_req_i -> the arbiter raises gc_req with
//         gc_process = i -> the GC module pulses gc_done when finished ->
//         the arbiter drops gc_req and clears GC_req_i.
//   Send: L_i raises send_req_i with send_to_i = j -> the arbiter raises
//         enq_req_j -> node j answers enq_ready_j when it is not working on
//         its queue -> the arbiter grants the bus by setting send_ack_i ->
//         L_i enqueues into Q_j and drops send_req_i -> the arbiter clears
//         enq_req_j and send_ack_i and waits for enq_ready_j to fall.
// The grant is a separate flag send_ack_i (the document's step 4 names
// send_req_i again, which L_i has already raised); a lower process index
// has the higher priority; a send to a process number outside 0..N-1 is
// granted without an enqueue partner. These three points are this design's
// choices. A GC and a send run at the same time when they are for
// different processes' memories, as the document allows.
module dm_arbiter
  import dm_pkg::*;
#(
  parameter int N  = 2,
  parameter int PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // flags read from the I/O modules
  input  logic [N-1:0]   gc_req_i,
  input  logic [N-1:0]   send_req_i,
  input  logic [PW-1:0]  send_to_i [N],
  input  logic [N-1:0]   enq_ready_i,
  // strobes to the I/O modules
  output logic [N-1:0]   gc_clr,
  output logic [N-1:0]   ack_set,
  output logic [N-1:0]   ack_clr,
  output logic [N-1:0]   enq_set,
  output logic [N-1:0]   enq_clr,
  // GC module
  output logic           gc_req,
  output logic [PW-1:0]  gc_process,
  input  logic           gc_done,
  // status, for observation
  output logic           send_busy,
  output logic [PW-1:0]  send_src,
  output logic [PW-1:0]  send_dst
);
  typedef enum logic [1:0] {G_IDLE, G_BUSY, G_CLEAR} gst_e;
  typedef enum logic [2:0] {S_IDLE, S_ENQ, S_XFER, S_DRAIN, S_REL} sst_e;

  gst_e gst;
  sst_e sst;
  logic dst_ok;

  // highest-priority (lowest index) pending request
  function automatic logic [PW-1:0] pick(input logic [N-1:0] v);
    logic [PW-1:0] r;
    r = '0;
    for (int k = N - 1; k >= 0; k--) if (v[k]) r = PW'(k);
    return r;
  endfunction

  assign send_busy = (sst != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gst        <= G_IDLE;
      sst        <= S_IDLE;
      gc_req     <= 1'b0;
      gc_process <= '0;
      send_src   <= '0;
      send_dst   <= '0;
      dst_ok     <= 1'b0;
      gc_clr     <= '0;
      ack_set    <= '0;
      ack_clr    <= '0;
      enq_set    <= '0;
      enq_clr    <= '0;
    end else begin
      gc_clr  <= '0;
      ack_set <= '0;
      ack_clr <= '0;
      enq_set <= '0;
      enq_clr <= '0;

      // ---------------- garbage collection ----------------
      unique case (gst)
        G_IDLE: if (|gc_req_i) begin
          gc_process <= pick(gc_req_i);
          gc_req     <= 1'b1;
          gst        <= G_BUSY;
        end
        G_BUSY: if (gc_done) begin
          gc_req             <= 1'b0;
          gc_clr[gc_process] <= 1'b1;
          gst                <= G_CLEAR;
        end
        G_CLEAR: gst <= G_IDLE;      // GC_req_i is cleared at this edge
        default: gst <= G_IDLE;
      endcase

      // ---------------- message send ----------------
      unique case (sst)
        S_IDLE: if (|send_req_i) begin
          send_src <= pick(send_req_i);
          send_dst <= send_to_i[pick(send_req_i)];
          dst_ok   <= int'(send_to_i[pick(send_req_i)]) < N;
          if (int'(send_to_i[pick(send_req_i)]) < N)
            enq_set[send_to_i[pick(send_req_i)]] <= 1'b1;
          sst <= S_ENQ;
        end
        S_ENQ: if (!dst_ok || enq_ready_i[send_dst]) begin
          ack_set[send_src] <= 1'b1;
          sst <= S_XFER;
        end
        S_XFER: if (!send_req_i[send_src]) begin
          ack_clr[send_src] <= 1'b1;
          if (dst_ok) enq_clr[send_dst] <= 1'b1;
          sst <= S_DRAIN;
        end
        S_DRAIN: sst <= S_REL;         // enq_req_j is cleared at this edge
        S_REL: if (!dst_ok || !enq_ready_i[send_dst]) sst <= S_IDLE;
        default: sst <= S_IDLE;
      endcase
    end
  end

  // one collection at a time; a grant only after the enqueue permission
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ($countones(ack_set) <= 1) else $error("dm_arbiter: two send grants");
      assert (!(gc_done && gst != G_BUSY)) else $error("dm_arbiter: gc_done without a collection");
    end
  end
endmodule
