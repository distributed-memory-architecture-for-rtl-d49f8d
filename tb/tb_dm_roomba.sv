// tb_dm_roomba: the two-process robot controller used as the example system
// (a joystick process proc0 and a translation process proc1), run on the
// default two-node system. The testbench stands in for the two process
// circuits and for the input port:
//   proc0: takes a 4-byte joystick record [Dt, Dh, Et, Eh], decodes it to
//          {Dh*256+Dt, Eh*256+Et}, sends {proc0, data, {Para, X}} to proc1,
//          then waits for {proc1, Cmd} and hands Cmd to the motor port
//          (here: a check against the expected 5-tuple);
//   proc1: receives, keeps the drive/turn state (calc), maps it to a motor
//          command (encode) and replies {proc1, Cmd}; any other message is
//          sent back to proc0 unchanged, where it is discarded.
// Every message is built in the sender's heap after a test_heap call, goes
// through send, the Q-bus and receive, and is read back from the receiver's
// heap. 160 records are sent, enough for both heaps to fill up and be
// garbage collected; the test fails if no collection happens. The expected
// commands are computed here from the input records alone.
module tb_dm_roomba;
  import dm_pkg::*;

  localparam int NP = 2;
  localparam int NREC = 160;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  mreq_t p_req [NP];
  word_t p_rdata [NP];
  logic [NP-1:0] lib_busy;
  logic  gc_active, gc_overflow, send_active;
  logic  gc_process, send_src, send_dst;

  dm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_gc = 0, n_cmd = 0, n_forward = 0;
  always @(posedge clk) if (rst_n && dut.gc_done) n_gc++;

  function automatic word_t atom(input int k);
    return {26'(k), 6'b001011};
  endfunction
  localparam int A_PROC0 = 1, A_PROC1 = 2, A_DATA = 3, A_NOISE = 4;

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
  // reserve m heap words (nothing live in x registers) and return the top
  task automatic reserve(input int i, input int m, output int top);
    word_t res, t;
    hw(i, HW_ARG_M, word_t'(m));
    hw(i, HW_ARG_N, 0);
    call(i, FN_TEST_HEAP, res);
    check("test_heap", res, RES_OK);
    hr(i, HW_HTOP, t);
    top = int'(t);
    hw(i, HW_HTOP, t + word_t'(m));
  endtask
  function automatic word_t boxed(input int i, input int w);
    return gaddr(H_SEG0 + i, w) | word_t'(TAG_BOXED);
  endfunction
  // block until a message is current, then leave it in x[0]
  task automatic get_msg(input int i, output word_t msg);
    word_t res;
    forever begin
      call(i, FN_RECEIVE, res);
      if (res == RES_OK) break;
      hw(i, HW_ARG_M, 2000);
      call(i, FN_WAIT, res);
    end
    hr(i, HW_X0, msg);
  endtask
  task automatic send(input int i, input int j, input word_t msg);
    word_t res;
    hw(i, HW_X0, make_pid(j));
    hw(i, HW_X0 + 1, msg);
    call(i, FN_SEND, res);
    check("send", res, RES_OK);
  endtask

  // ---- the controller's functions ----
  function automatic void calc(input int para, input int x, inout int drive, inout int turn);
    if (x == 258 || x == 1026)      drive = para;
    else if (x == 2 || x == 770)    turn = para;
    else begin drive = 0; turn = 0; end
  endfunction
  function automatic void encode(input int drive, input int turn, output int c [5]);
    int tsel;
    tsel = (turn >= 32768 && turn <= 57343) ? 0 : (turn >= 12288 && turn <= 32767) ? 1 : 2;
    if (drive >= 32768 && drive <= 57343)
      c = (tsel == 0) ? '{146, 0, 127, 0, 63} : (tsel == 1) ? '{146, 0, 63, 0, 127} : '{146, 0, 127, 0, 127};
    else if (drive >= 8192 && drive <= 32767)
      c = (tsel == 0) ? '{146, 255, 127, 255, 63} : (tsel == 1) ? '{146, 255, 63, 255, 127} : '{146, 255, 127, 255, 127};
    else
      c = (tsel == 0) ? '{146, 255, 127, 0, 127} : (tsel == 1) ? '{146, 0, 127, 255, 127} : '{146, 0, 0, 0, 0};
  endfunction

  // ---- input records and expected commands ----
  int rec_para [NREC], rec_x [NREC];
  int exp_cmd [NREC][5];
  initial begin
    int d, t, c [5];
    int paras [6] = '{40000, 20000, 100, 50000, 13000, 60000};
    int xs [5] = '{258, 1026, 2, 770, 5};
    d = 0; t = 0;
    for (int k = 0; k < NREC; k++) begin
      rec_para[k] = paras[$urandom % 6];
      rec_x[k]    = (k % 23 == 22) ? 5 : xs[$urandom % 4];
      calc(rec_para[k], rec_x[k], d, t);
      encode(d, t, c);
      exp_cmd[k] = c;
    end
  end

  // ---- proc0 ----
  task automatic proc0();
    int top, dt, dh, et, eh;
    word_t msg, w, cmd;
    for (int k = 0; k < NREC; k++) begin
      // the input port delivers [Dt, Dh, Et, Eh]; decode
      dt = rec_para[k] & 255; dh = rec_para[k] >> 8;
      et = rec_x[k] & 255;    eh = rec_x[k] >> 8;
      reserve(0, 7, top);
      hw(0, top,     word_t'(2) << 6);
      hw(0, top + 1, make_small(28'((dh << 8) | dt)));
      hw(0, top + 2, make_small(28'((eh << 8) | et)));
      hw(0, top + 3, word_t'(3) << 6);
      hw(0, top + 4, atom(A_PROC0));
      hw(0, top + 5, atom(A_DATA));
      hw(0, top + 6, boxed(0, top));
      send(0, 1, boxed(0, top + 3));
      if (k % 40 == 39) send(0, 1, atom(A_NOISE));   // an unexpected message
      // wait for the command
      forever begin
        get_msg(0, msg);
        call(0, FN_REMOVE, w);
        if (msg[1:0] == TAG_BOXED) begin
          hr(0, int'(widx_of(msg)) + 1, w);
          if (w == atom(A_PROC1)) break;
        end
        n_forward++;                                   // {Port1, _} / _ clauses: dropped
      end
      hr(0, int'(widx_of(msg)) + 2, cmd);
      hr(0, int'(widx_of(cmd)), w);
      check("command arity", w, word_t'(5) << 6);
      for (int f = 0; f < 5; f++) begin
        hr(0, int'(widx_of(cmd)) + 1 + f, w);
        check($sformatf("record %0d command byte %0d", k, f), w, make_small(28'(exp_cmd[k][f])));
      end
      n_cmd++;
    end
  endtask

  // ---- proc1 ----
  task automatic proc1();
    int d, t, top, c [5], done;
    word_t msg, w, data, para, x;
    d = 0; t = 0; done = 0;
    while (done < NREC) begin
      get_msg(1, msg);
      call(1, FN_REMOVE, w);
      w = '0;
      if (msg[1:0] == TAG_BOXED) hr(1, int'(widx_of(msg)), w);
      if (w == word_t'(3) << 6) begin
        hr(1, int'(widx_of(msg)) + 3, data);
        hr(1, int'(widx_of(data)) + 1, para);
        hr(1, int'(widx_of(data)) + 2, x);
        calc(int'(para >> 4), int'(x >> 4), d, t);
        encode(d, t, c);
        reserve(1, 9, top);
        hw(1, top, word_t'(5) << 6);
        for (int f = 0; f < 5; f++) hw(1, top + 1 + f, make_small(28'(c[f])));
        hw(1, top + 6, word_t'(2) << 6);
        hw(1, top + 7, atom(A_PROC1));
        hw(1, top + 8, boxed(1, top));
        send(1, 0, boxed(1, top + 6));
        done++;
      end else begin
        send(1, 0, msg);                               // X -> proc0 ! X
      end
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int i = 0; i < NP; i++) p_req[i] = MREQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NP; i++) begin
      hw(i, HW_SPACE, 0);
      hw(i, HW_HTOP, HEAP_BASE);
      hw(i, HW_SP, HEAP_BASE + SEMI_WORDS);
    end
    fork
      proc0();
      proc1();
    join
    $display("commands=%0d forwarded=%0d collections=%0d", n_cmd, n_forward, n_gc);
    check("all commands", n_cmd, NREC);
    checks++;
    if (n_forward == 0) begin failures++; $display("FAIL no forwarded message"); end
    checks++;
    if (n_gc == 0) begin failures++; $display("FAIL no garbage collection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
