// pctrl_dispatch: the microcoded Dispatch block of a protocol-controller unit.
//
// A request (opcode, source pipe, destination pipe, line address, tag) is
// turned into a timed series of read and write commands to the four data
// pipes. Which commands are sent, with which word offsets and access width,
// and in which cycles, is not wired in: it is the microprogram held in a
// ucode_seq. Changing the cache line size, single/double word access or the
// memory mode only changes the tables (see ctrl_pkg::build_ucode and
// ctrl_pkg::build_dispatch).
//
// Operation: while idle the sequencer sits on a microinstruction with
// seq = 0, which jumps through the Dispatch memory on the incoming opcode and
// accepts the request (req_ready). The request is latched; each following
// microinstruction may issue a read (to pipe src at addr + rd_off) and/or a
// write (to pipe dst at addr + wr_off). A read and a write that hit the same
// pipe travel in one command. The last microinstruction of a routine sets
// last, which pulses reply_valid, and has seq = 0, so the next request is
// accepted in that same cycle (back-to-back requests). If a command's queue
// is not ready the sequencer stalls: the micro-PC holds and nothing issues.
//
// Timing: a request accepted in cycle t issues its first command in cycle
// t + 1; a line read or write of B beats issues one command per cycle for B
// cycles (no stalls) and replies in the last of them.
//
// PROGRAMMABLE = 1 gives the flexible build (tables in writable memories,
// loaded at reset with the tables for LINE_WORDS / DBL / CACHED); 0 gives the
// specialised build (the same tables as constants). The use of microcode for
// commands and their timing, and the four pipes, follow the described unit;
// the microinstruction fields, stall rule and reply pulse are this design's
// choices.
module pctrl_dispatch
  import ctrl_pkg::*;
#(
  parameter int unsigned LINE_WORDS   = 8,
  parameter bit          DBL          = 1'b0,
  parameter bit          CACHED       = 1'b1,
  parameter bit          PROGRAMMABLE = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst,
  // request from the arbiter
  input  logic                   req_valid,
  input  pctrl_req_t             req,
  output logic                   req_ready,
  // commands towards the data-pipe queues
  output logic [NUM_PIPES-1:0]   cmd_valid,
  output pipe_cmd_t              cmd [NUM_PIPES],
  input  logic [NUM_PIPES-1:0]   cmd_ready,
  // completion towards the processor reply logic
  output logic                   reply_valid,
  output reply_t                 reply,
  // observation
  output logic [UPC_W-1:0]       upc,
  // configuration write ports
  input  logic                   disp_wr_en,
  input  logic [OP_W-1:0]        disp_wr_addr,
  input  logic [UPC_W-1:0]       disp_wr_data,
  input  logic                   uc_wr_en,
  input  logic [UPC_W-1:0]       uc_wr_addr,
  input  logic [UW-1:0]          uc_wr_data
);

  uinstr_t    ui;
  logic [UW-1:0] ui_bits;
  logic       en;
  logic [OP_W-1:0] opcode;
  pctrl_req_t cur;
  logic [NUM_PIPES-1:0] rd_hit, wr_hit;

  assign opcode = req_valid ? req.op : OP_NONE;

  ucode_seq #(
    .OPC_W        (OP_W),
    .UPC_W        (UPC_W),
    .UW           (UW),
    .SEQ_BIT      (0),
    .PROGRAMMABLE (PROGRAMMABLE),
    .DISP_INIT    (build_dispatch(LINE_WORDS, DBL, CACHED)),
    .UCODE_INIT   (build_ucode(LINE_WORDS, DBL, CACHED))
  ) u_seq (
    .clk, .rst, .en, .opcode, .upc,
    .uinstr       (ui_bits),
    .disp_wr_en, .disp_wr_addr, .disp_wr_data,
    .uc_wr_en, .uc_wr_addr, .uc_wr_data
  );

  assign ui = uinstr_t'(ui_bits);

  // Decode which pipes this step touches.
  always_comb begin
    rd_hit = '0;
    wr_hit = '0;
    if (ui.rd) rd_hit[cur.src] = 1'b1;
    if (ui.wr) wr_hit[cur.dst] = 1'b1;
  end

  // Stall while any addressed queue is full.
  assign en        = &(~(rd_hit | wr_hit) | cmd_ready);
  assign cmd_valid = en ? (rd_hit | wr_hit) : '0;

  for (genvar p = 0; p < NUM_PIPES; p++) begin : g_cmd
    always_comb begin
      cmd[p]         = '0;
      cmd[p].rd      = rd_hit[p];
      cmd[p].wr      = wr_hit[p];
      cmd[p].dbl     = ui.dbl;
      cmd[p].tag     = cur.tag;
      cmd[p].rd_addr = rd_hit[p] ? cur.addr + ADDR_W'(ui.rd_off) : '0;
      cmd[p].wr_addr = wr_hit[p] ? cur.addr + ADDR_W'(ui.wr_off) : '0;
    end
  end

  assign req_ready   = en && !ui.seq;
  assign reply_valid = en && ui.last;
  assign reply.tag   = cur.tag;
  assign reply.err   = ui.err;

  always_ff @(posedge clk) begin
    if (rst)                         cur <= '0;
    else if (req_valid && req_ready) cur <= req;
  end

endmodule
