// dm_spram: single-port local memory, one H_i (heap and stack) or one Q_i
// (message queue and mini heaps) of a process.
//
// The distributed memory scheme gives each process memories of its own that
// need only one port each; this is that memory. One access per cycle: a
// write stores wdata at addr on the clock edge, a read returns the word at
// addr on rdata in the following cycle (synchronous read, block-RAM style).
// The depth and the read latency are this design's choice. Contents are
// cleared by the simulator's initial block so that every word reads defined.
module dm_spram #(
  parameter int DEPTH = dm_pkg::LOCAL_WORDS,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  dm_pkg::word_t     wdata,
  output dm_pkg::word_t     rdata
);
  dm_pkg::word_t mem [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++) mem[k] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
