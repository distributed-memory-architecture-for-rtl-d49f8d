// tb_dm_bus: three nodes with memories plus one master without a memory.
// Checks local accesses of all nodes in the same cycle, bus writes and
// reads between nodes and from the extra master, one-cycle read latency on
// both paths, and a read of a segment no memory owns (returns 0).
module tb_dm_bus;
  import dm_pkg::*;
  localparam int N = 3, NX = 1, SEG0 = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  mreq_t m_req [N+NX];
  word_t m_rdata [N+NX];
  logic  mem_en [N], mem_we [N];
  widx_t mem_addr [N];
  word_t mem_wdata [N], mem_rdata [N];
  int checks = 0, failures = 0;

  dm_bus #(.N(N), .NX(NX), .SEG0(SEG0)) dut (.*);
  for (genvar t = 0; t < N; t++) begin : g_mem
    dm_spram u_m (.clk, .en(mem_en[t]), .we(mem_we[t]), .addr(mem_addr[t]),
                  .wdata(mem_wdata[t]), .rdata(mem_rdata[t]));
  end
  always #5 clk = ~clk;

  task automatic idle_all();
    for (int k = 0; k < N + NX; k++) m_req[k] = MREQ_IDLE;
  endtask
  task automatic chk(input string w, input word_t g, input word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h vs %h", w, g, e); end
  endtask
  // one access by master k, read data checked one cycle later
  task automatic one(input int k, input logic we, input int seg, input int w,
                     input word_t d, input word_t exp);
    @(negedge clk);
    idle_all();
    m_req[k] = '{req: 1'b1, we: we, addr: gaddr(seg, w), wdata: d};
    @(negedge clk);
    idle_all();
    if (!we) chk($sformatf("master %0d read seg %0d word %0d", k, seg, w), m_rdata[k], exp);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_all();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // every node writes its own memory in the same cycle
    @(negedge clk);
    for (int k = 0; k < N; k++) m_req[k] = '{req: 1'b1, we: 1'b1, addr: gaddr(SEG0 + k, 5), wdata: 32'hA000 + k};
    @(negedge clk);
    // every node reads its own memory in the same cycle
    for (int k = 0; k < N; k++) m_req[k] = '{req: 1'b1, we: 1'b0, addr: gaddr(SEG0 + k, 5), wdata: '0};
    @(negedge clk);
    idle_all();
    for (int k = 0; k < N; k++) chk("parallel local read", m_rdata[k], 32'hA000 + k);
    // node 0 writes into memory 2 over the bus while node 1 works locally
    @(negedge clk);
    m_req[0] = '{req: 1'b1, we: 1'b1, addr: gaddr(SEG0 + 2, 9), wdata: 32'hBEEF};
    m_req[1] = '{req: 1'b1, we: 1'b1, addr: gaddr(SEG0 + 1, 9), wdata: 32'h1111};
    @(negedge clk);
    idle_all();
    one(2, 1'b0, SEG0 + 2, 9, '0, 32'hBEEF);     // seen locally by node 2
    one(1, 1'b0, SEG0 + 1, 9, '0, 32'h1111);
    // bus read by node 1 from memory 0, while node 2 reads locally
    @(negedge clk);
    m_req[1] = '{req: 1'b1, we: 1'b0, addr: gaddr(SEG0 + 0, 5), wdata: '0};
    m_req[2] = '{req: 1'b1, we: 1'b0, addr: gaddr(SEG0 + 2, 5), wdata: '0};
    @(negedge clk);
    idle_all();
    chk("bus read by node 1", m_rdata[1], 32'hA000);
    chk("local read beside bus read", m_rdata[2], 32'hA002);
    // extra master writes and reads every memory over the bus
    for (int t = 0; t < N; t++) one(N, 1'b1, SEG0 + t, 100 + t, 32'hC000 + t, '0);
    for (int t = 0; t < N; t++) one(N, 1'b0, SEG0 + t, 100 + t, '0, 32'hC000 + t);
    for (int t = 0; t < N; t++) one(t, 1'b0, SEG0 + t, 100 + t, '0, 32'hC000 + t);
    // random traffic: one bus master at a time against a reference
    begin
      word_t refm [N][64];
      for (int t = 0; t < N; t++) for (int w = 0; w < 64; w++) begin
        refm[t][w] = $urandom;
        one(N, 1'b1, SEG0 + t, w, refm[t][w], '0);
      end
      for (int n = 0; n < 200; n++) begin
        int k, t, w;
        k = $urandom % (N + NX); t = $urandom % N; w = $urandom % 64;
        if ($urandom % 2) begin
          refm[t][w] = $urandom;
          one(k, 1'b1, SEG0 + t, w, refm[t][w], '0);
        end else one(k, 1'b0, SEG0 + t, w, '0, refm[t][w]);
      end
    end
    // unowned segment
    one(0, 1'b0, SEG0 + 7, 3, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
