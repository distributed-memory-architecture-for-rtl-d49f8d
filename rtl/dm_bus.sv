// dm_bus: bus module, used once as the Q-bus (in front of the Q_i) and once
// as the H-bus (in front of the H_i).
//
// Node k (k < N) owns memory k, whose segment number is SEG0+k. A request
// from node k is routed by its address:
//   * segment == SEG0+k: forwarded to memory k with the local word index;
//     the answer of memory k goes back to node k (a local access);
//   * any other segment: placed on the shared bus with the full address;
//     the memory whose segment matches takes it, and its answer is put on the
//     bus and returned to the requester.
// Masters N..N+NX-1 own no memory (the GC module on the H-bus), so all their
// accesses use the bus. These rules are the document's. The arbiter
// guarantees that at most one master uses the bus at a time and that a bus
// access never meets a local access to the same memory; assertions check
// both. Where they would collide anyway the local access wins (this design's
// choice).
//
// Timing: the request is routed combinationally to the memory in the cycle
// it is raised; read data returns on m_rdata one cycle later, the same for
// local and bus accesses. An access to a segment no memory owns reads 0.
module dm_bus
  import dm_pkg::*;
#(
  parameter int N    = 2,   // nodes with a memory
  parameter int NX   = 1,   // extra masters without a memory
  parameter int SEG0 = 0    // segment number of memory 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mreq_t         m_req   [N+NX],
  output word_t         m_rdata [N+NX],
  // memory ports
  output logic          mem_en    [N],
  output logic          mem_we    [N],
  output widx_t         mem_addr  [N],
  output word_t         mem_wdata [N],
  input  word_t         mem_rdata [N]
);
  localparam int NM = N + NX;
  localparam int MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int TW = (N > 1) ? $clog2(N) : 1;

  logic        is_local [NM];
  logic        on_bus   [NM];
  // the shared bus itself
  logic        bus_req;
  mreq_t       bus;
  logic [MW-1:0] bus_master;
  logic        bus_hit;       // some memory owns the bus address
  logic [TW-1:0] bus_tgt;
  word_t       bus_rdata;

  // registered routing of read answers
  logic        rd_local_q [NM];
  logic        rd_bus_q   [NM];
  logic        bus_hit_q;
  logic [TW-1:0] bus_tgt_q;

  always_comb begin
    bus_req    = 1'b0;
    bus        = MREQ_IDLE;
    bus_master = '0;
    for (int k = 0; k < NM; k++) begin
      is_local[k] = m_req[k].req && (k < N) &&
                    (int'(seg_of(m_req[k].addr)) == SEG0 + k);
      on_bus[k]   = m_req[k].req && !is_local[k];
      if (on_bus[k] && !bus_req) begin
        bus_req    = 1'b1;
        bus        = m_req[k];
        bus_master = MW'(k);
      end
    end
    bus_hit = 1'b0;
    bus_tgt = '0;
    for (int t = 0; t < N; t++) begin
      if (bus_req && int'(seg_of(bus.addr)) == SEG0 + t) begin
        bus_hit = 1'b1;
        bus_tgt = TW'(t);
      end
    end
  end

  // memory side: local access first, then a bus access aimed at this memory
  always_comb begin
    for (int t = 0; t < N; t++) begin
      if (is_local[t]) begin
        mem_en[t]    = 1'b1;
        mem_we[t]    = m_req[t].we;
        mem_addr[t]  = widx_of(m_req[t].addr);
        mem_wdata[t] = m_req[t].wdata;
      end else begin
        mem_en[t]    = bus_hit && (int'(bus_tgt) == t);
        mem_we[t]    = bus.we;
        mem_addr[t]  = widx_of(bus.addr);
        mem_wdata[t] = bus.wdata;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NM; k++) begin
        rd_local_q[k] <= 1'b0;
        rd_bus_q[k]   <= 1'b0;
      end
      bus_hit_q <= 1'b0;
      bus_tgt_q <= '0;
    end else begin
      for (int k = 0; k < NM; k++) begin
        rd_local_q[k] <= is_local[k] && !m_req[k].we;
        rd_bus_q[k]   <= bus_req && (int'(bus_master) == k) && !bus.we;
      end
      bus_hit_q <= bus_hit;
      bus_tgt_q <= bus_tgt;
    end
  end

  assign bus_rdata = bus_hit_q ? mem_rdata[bus_tgt_q] : '0;

  always_comb begin
    for (int k = 0; k < NM; k++) begin
      if (k < N && rd_local_q[k]) m_rdata[k] = mem_rdata[k < N ? k : 0];
      else if (rd_bus_q[k])       m_rdata[k] = bus_rdata;
      else                        m_rdata[k] = '0;
    end
  end

  int n_on_bus;
  always_comb begin
    n_on_bus = 0;
    for (int k = 0; k < NM; k++) n_on_bus += int'(on_bus[k]);
  end

  // The arbiter keeps the bus exclusive and local/bus accesses disjoint.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (n_on_bus <= 1)
        else $error("dm_bus: two masters on the bus at once");
      for (int t = 0; t < N; t++)
        assert (!(is_local[t] && bus_hit && int'(bus_tgt) == t))
          else $error("dm_bus: bus access collides with a local access");
    end
  end
endmodule
