// dm_pkg: types and constants shared by the distributed-memory Erlang
// controller fabric.
//
// The system has one 32-bit byte address space. The upper SEG_W bits of an
// address select a segment (one local memory H_i or Q_i, or the register
// window of one I/O module) and the lower LOCAL_AW bits address a byte inside
// it; every memory word is 32 bits, so a word index is addr[LOCAL_AW-1:2].
// The split of the address into segment and local part follows the document;
// the segment numbers, memory sizes and the layout of the bookkeeping words
// inside H_i and Q_i are this design's own choices.
//
// Erlang terms are 32-bit words tagged in their low bits, as in the BEAM
// virtual machine: a small integer carries 4'b1111 in its low four bits, a
// list (cons) pointer carries 2'b01 with the cell's byte address above it
// (car at the address, cdr four bytes later), both as the document gives.
// A boxed (tuple) pointer carries 2'b10 and points at a header word whose low
// six bits are zero and whose upper 26 bits hold the arity; other immediates
// (atoms, pids, nil) have 2'b11 in their two low bits. A pid of process j is
// {j, 4'b0011}. These last encodings follow the BEAM convention and are this
// design's choice.
package dm_pkg;

  localparam int WORD_W   = 32;
  localparam int LOCAL_AW = 14;                 // byte address bits per segment
  localparam int SEG_W    = WORD_W - LOCAL_AW;  // segment number bits
  localparam int WIDX_W   = LOCAL_AW - 2;       // word index bits
  localparam int LOCAL_WORDS = 1 << WIDX_W;     // 4096 words per local memory

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [WIDX_W-1:0] widx_t;
  typedef logic [SEG_W-1:0]  seg_t;

  // Segment map: H_i -> H_SEG0+i, Q_i -> Q_SEG0+i, I/O module i -> IO_SEG0+i.
  localparam int H_SEG0  = 0;
  localparam int Q_SEG0  = 16;
  localparam int IO_SEG0 = 32;
  localparam int MAX_PROC = 10;                 // "fixed number of processes up to 10"

  // One request of a bus master. Read data returns one cycle after a read.
  typedef struct packed {
    logic  req;
    logic  we;
    word_t addr;
    word_t wdata;
  } mreq_t;

  localparam mreq_t MREQ_IDLE = '{req: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  // Library functions, numbered 1..7 in the order the document lists them.
  typedef enum logic [2:0] {
    FN_IDLE      = 3'd0,
    FN_TEST_HEAP = 3'd1,
    FN_ALLOCATE  = 3'd2,
    FN_SEND      = 3'd3,
    FN_RECEIVE   = 3'd4,
    FN_REMOVE    = 3'd5,
    FN_SAVE      = 3'd6,
    FN_WAIT      = 3'd7
  } fn_e;

  // Result codes written to H[HW_RESULT] by the library module.
  localparam word_t RES_OK       = 32'd0;
  localparam word_t RES_NONE     = 32'd1;   // no message / timed out
  localparam word_t RES_OVERFLOW = 32'd2;   // not enough free words even after GC

  // Term tags.
  localparam logic [1:0] TAG_HEADER = 2'b00;
  localparam logic [1:0] TAG_LIST   = 2'b01;
  localparam logic [1:0] TAG_BOXED  = 2'b10;
  localparam logic [1:0] TAG_IMM    = 2'b11;
  localparam logic [3:0] TAG_SMALL  = 4'b1111;
  localparam logic [3:0] TAG_PID    = 4'b0011;
  localparam word_t      NIL        = 32'h0000_003B;
  // Left by the collector in the first word of a copied object (the second
  // word then holds the new pointer). Tag 00 like a header, but a header's
  // low six bits are always zero, and no term has tag 00.
  localparam word_t      FWD_MARK   = 32'h0000_003C;

  // Word layout of H_i.
  localparam int HW_X0     = 0;    // x[0..7]: argument / result registers
  localparam int HW_HTOP   = 8;    // heap top (word index)
  localparam int HW_SP     = 9;    // stack pointer (word index, stack grows down)
  localparam int HW_SPACE  = 10;   // active semispace, 0 or 1
  localparam int HW_RESULT = 11;   // result code of the last library call
  localparam int HW_ARG_M  = 12;   // argument m (words, or t cycles)
  localparam int HW_ARG_N  = 13;   // argument n (live x registers)
  localparam int HEAP_BASE = 16;
  localparam int SEMI_WORDS = (LOCAL_WORDS - HEAP_BASE) / 2;

  // Word layout of Q_i. A message record is [next, term, size] followed by
  // its mini heap of `size` words.
  localparam int QW_HEAD = 0;
  localparam int QW_TAIL = 1;
  localparam int QW_SAVE = 2;     // current message (0: none left to examine)
  localparam int QW_TOP  = 3;     // first free word
  localparam int QW_PREV = 4;     // message before QW_SAVE (0: QW_SAVE is the head)
  localparam int Q_BASE  = 8;
  localparam int QREC_HDR = 3;

  // Register window of an I/O module (word index inside its segment).
  localparam int IO_RUN       = 0;
  localparam int IO_GC_REQ    = 1;
  localparam int IO_SEND_REQ  = 2;
  localparam int IO_SEND_TO   = 3;
  localparam int IO_SEND_ACK  = 4;
  localparam int IO_ENQ_REQ   = 5;
  localparam int IO_ENQ_READY = 6;

  function automatic word_t gaddr(input int seg, input int widx);
    word_t a;
    a = '0;
    a[WORD_W-1:LOCAL_AW] = seg_t'(seg);
    a[LOCAL_AW-1:2]      = widx_t'(widx);
    return a;
  endfunction

  function automatic seg_t seg_of(input word_t a);
    return a[WORD_W-1:LOCAL_AW];
  endfunction

  function automatic widx_t widx_of(input word_t a);
    return a[LOCAL_AW-1:2];
  endfunction

  function automatic int semi_base(input logic space);
    return HEAP_BASE + (space ? SEMI_WORDS : 0);
  endfunction

  function automatic word_t make_small(input logic [27:0] v);
    return {v, TAG_SMALL};
  endfunction

  function automatic word_t make_pid(input int p);
    return {28'(p), TAG_PID};
  endfunction

endpackage
