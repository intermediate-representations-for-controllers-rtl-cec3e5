// pctrl_unit: one functional unit of the protocol controller (PCtrl).
//
// Requests from NUM_REQ = 3 other units meet at a round-robin arbiter. The
// winner goes to the microcoded Dispatch block, which issues line read and
// line write commands to NUM_PIPES = 4 data pipes, each behind its own input
// queue; each data pipe leads to the local memory of one two-processor tile.
// What each pipe sends on towards the other units passes through an output
// queue per pipe. Dispatch also reports each finished request on the reply
// port, towards the processor reply logic.
//
// The data pipes and the processor reply FSM are not part of this module:
// their connections are ports (pipe_cmd_* out to the pipes, pipe_rsp_* in
// from the pipes, reply_* to the reply FSM).
//
// Parameters choose the configuration: LINE_WORDS (cache line size in words),
// DBL (double-word access to the caches), CACHED (cached or uncached memory
// mode), PROGRAMMABLE (1: the microcode lives in writable configuration
// memories and can be reprogrammed through the cfg ports; 0: it is a
// constant that synthesis folds into fixed control logic), QDEPTH (queue
// depth).
//
// Timing: arbitration and dispatch of a request take the cycle in which the
// request is accepted; its first command is in an input queue one cycle
// later and visible to the pipe the cycle after that.
module pctrl_unit
  import ctrl_pkg::*;
#(
  parameter int unsigned LINE_WORDS   = 8,
  parameter bit          DBL          = 1'b0,
  parameter bit          CACHED       = 1'b1,
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter int unsigned QDEPTH       = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  // requests from other units
  input  logic [NUM_REQ-1:0]   req_valid,
  input  pctrl_req_t           req [NUM_REQ],
  output logic [NUM_REQ-1:0]   req_ready,
  // to the data pipes
  output logic [NUM_PIPES-1:0] pipe_cmd_valid,
  output pipe_cmd_t            pipe_cmd [NUM_PIPES],
  input  logic [NUM_PIPES-1:0] pipe_cmd_ready,
  // from the data pipes
  input  logic [NUM_PIPES-1:0] pipe_rsp_valid,
  input  pipe_rsp_t            pipe_rsp [NUM_PIPES],
  output logic [NUM_PIPES-1:0] pipe_rsp_ready,
  // to other units
  output logic [NUM_PIPES-1:0] out_valid,
  output pipe_rsp_t            out [NUM_PIPES],
  input  logic [NUM_PIPES-1:0] out_ready,
  // to the processor reply logic
  output logic                 reply_valid,
  output reply_t               reply,
  // observation: micro-PC and arbiter grant
  output logic [UPC_W-1:0]     upc,
  output logic [NUM_REQ-1:0]   grant,
  // microcode configuration write ports
  input  logic                 disp_wr_en,
  input  logic [OP_W-1:0]      disp_wr_addr,
  input  logic [UPC_W-1:0]     disp_wr_data,
  input  logic                 uc_wr_en,
  input  logic [UPC_W-1:0]     uc_wr_addr,
  input  logic [UW-1:0]        uc_wr_data
);


  logic                 arb_valid, arb_ready;
  pctrl_req_t           arb_req;
  logic [NUM_PIPES-1:0] cmd_valid, cmd_ready;
  pipe_cmd_t            cmd [NUM_PIPES];

  pctrl_arb #(.NREQ(NUM_REQ), .T(pctrl_req_t)) u_arb (
    .clk, .rst,
    .in_valid  (req_valid),
    .in_data   (req),
    .in_ready  (req_ready),
    .out_valid (arb_valid),
    .out_data  (arb_req),
    .out_ready (arb_ready),
    .grant     (grant)
  );

  pctrl_dispatch #(
    .LINE_WORDS   (LINE_WORDS),
    .DBL          (DBL),
    .CACHED       (CACHED),
    .PROGRAMMABLE (PROGRAMMABLE)
  ) u_dispatch (
    .clk, .rst,
    .req_valid (arb_valid),
    .req       (arb_req),
    .req_ready (arb_ready),
    .cmd_valid, .cmd, .cmd_ready,
    .reply_valid, .reply, .upc,
    .disp_wr_en, .disp_wr_addr, .disp_wr_data,
    .uc_wr_en, .uc_wr_addr, .uc_wr_data
  );

  for (genvar p = 0; p < NUM_PIPES; p++) begin : g_pipe

    pctrl_fifo #(.DEPTH(QDEPTH), .T(pipe_cmd_t)) u_in_q (
      .clk, .rst,
      .in_valid  (cmd_valid[p]),
      .in_ready  (cmd_ready[p]),
      .in_data   (cmd[p]),
      .out_valid (pipe_cmd_valid[p]),
      .out_ready (pipe_cmd_ready[p]),
      .out_data  (pipe_cmd[p]),
      .count     ()
    );

    pctrl_fifo #(.DEPTH(QDEPTH), .T(pipe_rsp_t)) u_out_q (
      .clk, .rst,
      .in_valid  (pipe_rsp_valid[p]),
      .in_ready  (pipe_rsp_ready[p]),
      .in_data   (pipe_rsp[p]),
      .out_valid (out_valid[p]),
      .out_ready (out_ready[p]),
      .out_data  (out[p]),
      .count     ()
    );
  end

endmodule
