// tb_dm_spram: random writes and reads against a reference array; checks
// that read data appears exactly one cycle after the read request and that
// a write does not disturb the read output.
module tb_dm_spram;
  import dm_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [5:0] addr = '0;
  word_t wdata = '0, rdata;
  word_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  dm_spram #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t held;
    for (int k = 0; k < DEPTH; k++) ref_mem[k] = '0;
    for (int k = 0; k < DEPTH; k++) begin           // fill
      @(negedge clk); en = 1; we = 1; addr = 6'(k); wdata = $urandom; ref_mem[k] = wdata;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = 1; we = ($urandom % 3 == 0); addr = 6'($urandom); wdata = $urandom;
      if (!we) begin
        held = ref_mem[addr];
        @(negedge clk);
        en = 0; we = 0;
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL read %0d: %h vs %h", addr, rdata, held); end
        // a following write must leave rdata alone
        en = 1; we = 1; addr = 6'($urandom); wdata = $urandom; ref_mem[addr] = wdata;
        @(negedge clk);
        en = 0; we = 0;
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL rdata changed by write"); end
      end else begin
        ref_mem[addr] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
