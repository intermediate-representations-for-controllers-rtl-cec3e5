// ctrl_pkg: types, constants and table builders shared by the table-driven
// controllers.
//
// The protocol-controller unit (pctrl_unit) is a microcoded controller: an
// arbiter picks one request from the other units, a Dispatch block runs a
// microprogram for it and issues line read / line write commands to four data
// pipes through per-pipe queues. The microprogram is only a table of bits, so
// this package also holds the functions that compute the table contents for a
// given cache configuration (line size, single or double word access, cached
// or uncached memory mode). The same tables can be loaded into the writable
// configuration memories at reset ("flexible" build) or bound as constants so
// that synthesis folds them into fixed logic ("specialised" build).
//
// The four data pipes, three requesting units and the split into line read and
// line write commands follow the described unit. Widths, opcode values, the
// microinstruction layout and the routine order in the microcode memory are
// this design's own choices.
package ctrl_pkg;

  // ---------------------------------------------------------------------
  // Protocol-controller unit sizes
  // ---------------------------------------------------------------------
  localparam int unsigned NUM_PIPES = 4;   // data pipes, one per two-processor tile
  localparam int unsigned NUM_REQ   = 3;   // requesting units at the arbiter
  localparam int unsigned ADDR_W    = 32;  // word address
  localparam int unsigned DATA_W    = 64;  // one double word
  localparam int unsigned TAG_W     = 4;   // request tag returned with replies
  localparam int unsigned PIPE_W    = $clog2(NUM_PIPES);
  localparam int unsigned OFF_W     = 4;   // word offset in a line: up to 16 words
  localparam int unsigned OP_W      = 3;   // dispatch opcode width
  localparam int unsigned UPC_W     = 6;   // micro-PC width: 64 microinstructions
  localparam int unsigned XFER_LAG  = 2;   // cycles from first read to first write in a transfer

  // Request opcodes seen by the Dispatch memory.
  typedef enum logic [OP_W-1:0] {
    OP_NONE      = 3'd0,  // no request: stay idle
    OP_LINE_RD   = 3'd1,  // read a whole line from pipe src
    OP_LINE_WR   = 3'd2,  // write a whole line into pipe dst
    OP_LINE_XFER = 3'd3,  // move a line from pipe src to pipe dst (cache-to-cache)
    OP_WORD_RD   = 3'd4,  // single-word read from pipe src
    OP_WORD_WR   = 3'd5   // single-word write into pipe dst
  } op_e;

  // Request from another unit of the controller.
  typedef struct packed {
    op_e               op;
    logic [PIPE_W-1:0] src;
    logic [PIPE_W-1:0] dst;
    logic [ADDR_W-1:0] addr;  // line-aligned word address
    logic [TAG_W-1:0]  tag;
  } pctrl_req_t;

  // Command to one data pipe. A transfer whose source and destination pipe are
  // the same can read one part of the line and write another in one command.
  typedef struct packed {
    logic              rd;
    logic              wr;
    logic              dbl;      // double-word access
    logic [ADDR_W-1:0] rd_addr;
    logic [ADDR_W-1:0] wr_addr;
    logic [TAG_W-1:0]  tag;
  } pipe_cmd_t;

  // Result from one data pipe towards the other units.
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [TAG_W-1:0]  tag;
  } pipe_rsp_t;

  // Completion notice towards the processor reply logic.
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic             err;  // opcode not supported by the loaded microcode
  } reply_t;

  // Horizontal microinstruction of the Dispatch block. Bit 0 is the sequencer
  // select: 1 = go to micro-PC + 1, 0 = jump through the Dispatch memory (and
  // accept the next request).
  typedef struct packed {
    logic             err;     // report the request as unsupported
    logic             last;    // last step of a routine: send the reply
    logic             dbl;     // access width of this step's commands
    logic [OFF_W-1:0] wr_off;  // word offset of the write
    logic [OFF_W-1:0] rd_off;  // word offset of the read
    logic             wr;      // issue a write to pipe dst
    logic             rd;      // issue a read from pipe src
    logic             seq;     // 1: increment micro-PC, 0: dispatch
  } uinstr_t;

  localparam int unsigned UW         = $bits(uinstr_t);
  localparam int unsigned UCODE_BITS = (2 ** UPC_W) * UW;
  localparam int unsigned DISP_BITS  = (2 ** OP_W) * UPC_W;

  // Fixed micro-PC values.
  localparam logic [UPC_W-1:0] UPC_IDLE = '0;  // waits for a request
  localparam logic [UPC_W-1:0] UPC_ERR  = 1;   // replies with err set

  // ---------------------------------------------------------------------
  // State-propagation example (one-hot decoder, flop, AND, mux)
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    RST_NONE  = 2'd0,
    RST_SYNC  = 2'd1,
    RST_ASYNC = 2'd2
  } rst_mode_e;

  // ---------------------------------------------------------------------
  // Microcode layout
  //
  //   0                     idle: dispatch on the incoming opcode
  //   1                     error: reply with err, dispatch
  //   cached mode only:
  //   2                     LINE_RD,   B = LINE_WORDS / (DBL ? 2 : 1) steps
  //   2+B                   LINE_WR,   B steps
  //   2+2B                  LINE_XFER, B + XFER_LAG steps
  //   both modes:
  //   next                  WORD_RD, one step
  //   next + 1              WORD_WR, one step
  // ---------------------------------------------------------------------
  function automatic int unsigned beats(int unsigned line_words, bit dbl);
    return dbl ? line_words / 2 : line_words;
  endfunction

  // Start address of each routine; UPC_ERR for an opcode the mode lacks.
  function automatic logic [UPC_W-1:0] routine_start(op_e op, int unsigned line_words,
                                                     bit dbl, bit cached);
    int unsigned b;
    int unsigned word_base;
    b         = beats(line_words, dbl);
    word_base = cached ? 2 + 3 * b + XFER_LAG : 2;
    case (op)
      OP_NONE:      return UPC_IDLE;
      OP_LINE_RD:   return cached ? UPC_W'(2) : UPC_ERR;
      OP_LINE_WR:   return cached ? UPC_W'(2 + b) : UPC_ERR;
      OP_LINE_XFER: return cached ? UPC_W'(2 + 2 * b) : UPC_ERR;
      OP_WORD_RD:   return UPC_W'(word_base);
      OP_WORD_WR:   return UPC_W'(word_base + 1);
      default:      return UPC_ERR;
    endcase
  endfunction

  // Dispatch memory contents: entry i holds the start of the routine for opcode i.
  function automatic logic [DISP_BITS-1:0] build_dispatch(int unsigned line_words,
                                                          bit dbl, bit cached);
    logic [DISP_BITS-1:0] t;
    t = '0;
    for (int unsigned i = 0; i < 2 ** OP_W; i++)
      t[i*UPC_W +: UPC_W] = routine_start(op_e'(i), line_words, dbl, cached);
    return t;
  endfunction

  // Microcode memory contents.
  function automatic logic [UCODE_BITS-1:0] build_ucode(int unsigned line_words,
                                                        bit dbl, bit cached);
    logic [UCODE_BITS-1:0] t;
    uinstr_t               u;
    int unsigned           b;
    int unsigned           step;
    int unsigned           pc;
    t    = '0;
    b    = beats(line_words, dbl);
    step = dbl ? 2 : 1;

    // idle
    u = '0;
    t[0*UW +: UW] = u;
    // error
    u = '0; u.last = 1'b1; u.err = 1'b1;
    t[1*UW +: UW] = u;
    pc = 2;

    if (cached) begin
      // line read
      for (int unsigned i = 0; i < b; i++) begin
        u = '0; u.seq = (i != b - 1); u.last = (i == b - 1);
        u.rd = 1'b1; u.dbl = dbl; u.rd_off = OFF_W'(i * step);
        t[pc*UW +: UW] = u; pc++;
      end
      // line write
      for (int unsigned i = 0; i < b; i++) begin
        u = '0; u.seq = (i != b - 1); u.last = (i == b - 1);
        u.wr = 1'b1; u.dbl = dbl; u.wr_off = OFF_W'(i * step);
        t[pc*UW +: UW] = u; pc++;
      end
      // line transfer: writes trail reads by XFER_LAG steps
      for (int unsigned i = 0; i < b + XFER_LAG; i++) begin
        u = '0; u.seq = (i != b + XFER_LAG - 1); u.last = (i == b + XFER_LAG - 1);
        u.dbl = dbl;
        if (i < b) begin
          u.rd = 1'b1; u.rd_off = OFF_W'(i * step);
        end
        if (i >= XFER_LAG) begin
          u.wr = 1'b1; u.wr_off = OFF_W'((i - XFER_LAG) * step);
        end
        t[pc*UW +: UW] = u; pc++;
      end
    end
    // word read
    u = '0; u.rd = 1'b1; u.last = 1'b1;
    t[pc*UW +: UW] = u; pc++;
    // word write
    u = '0; u.wr = 1'b1; u.last = 1'b1;
    t[pc*UW +: UW] = u;
    return t;
  endfunction

endpackage
