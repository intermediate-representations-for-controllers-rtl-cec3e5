// ctrl_ir_top: the table-driven controllers side by side.
//
// Three independent designs share nothing but the clock and reset:
//  - fsm_*:  a table-based FSM (table_fsm) with 5 inputs, 4 states and
//            3 outputs, next-state and output memories programmable through
//            the fsm_ns_wr_* and fsm_out_wr_* ports.
//  - oh_*:   the one-hot decoder / flop / AND / mux example (onehot_mux),
//            8 bits wide, synchronous reset.
//  - pc_*:   one protocol-controller unit (pctrl_unit): arbiter, microcoded
//            Dispatch and four pairs of data-pipe queues, cached mode, 8-word
//            lines, single-word access, microcode reprogrammable through the
//            pc_disp_wr_* and pc_uc_wr_* ports. The data pipes and the
//            processor reply FSM sit outside: their connections are ports.
// The generic microcode sequencer and the configurable tables are used
// inside these. Timing of each part is that of its module.
module ctrl_ir_top
  import ctrl_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // table-based FSM
  input  logic [4:0]           fsm_in,
  output logic [2:0]           fsm_out,
  output logic [1:0]           fsm_state,
  input  logic                 fsm_ns_wr_en,
  input  logic [6:0]           fsm_ns_wr_addr,
  input  logic [1:0]           fsm_ns_wr_data,
  input  logic                 fsm_out_wr_en,
  input  logic [6:0]           fsm_out_wr_addr,
  input  logic [2:0]           fsm_out_wr_data,
  // one-hot example
  input  logic [2:0]           oh_in,
  output logic [7:0]           oh_out,
  // protocol-controller unit
  input  logic [NUM_REQ-1:0]   pc_req_valid,
  input  pctrl_req_t           pc_req [NUM_REQ],
  output logic [NUM_REQ-1:0]   pc_req_ready,
  output logic [NUM_PIPES-1:0] pc_pipe_cmd_valid,
  output pipe_cmd_t            pc_pipe_cmd [NUM_PIPES],
  input  logic [NUM_PIPES-1:0] pc_pipe_cmd_ready,
  input  logic [NUM_PIPES-1:0] pc_pipe_rsp_valid,
  input  pipe_rsp_t            pc_pipe_rsp [NUM_PIPES],
  output logic [NUM_PIPES-1:0] pc_pipe_rsp_ready,
  output logic [NUM_PIPES-1:0] pc_out_valid,
  output pipe_rsp_t            pc_out [NUM_PIPES],
  input  logic [NUM_PIPES-1:0] pc_out_ready,
  output logic                 pc_reply_valid,
  output reply_t               pc_reply,
  output logic [UPC_W-1:0]     pc_upc,
  output logic [NUM_REQ-1:0]   pc_grant,
  input  logic                 pc_disp_wr_en,
  input  logic [OP_W-1:0]      pc_disp_wr_addr,
  input  logic [UPC_W-1:0]     pc_disp_wr_data,
  input  logic                 pc_uc_wr_en,
  input  logic [UPC_W-1:0]     pc_uc_wr_addr,
  input  logic [UW-1:0]        pc_uc_wr_data
);

  table_fsm u_fsm (
    .clk, .rst,
    .in          (fsm_in),
    .out         (fsm_out),
    .state       (fsm_state),
    .ns_wr_en    (fsm_ns_wr_en),
    .ns_wr_addr  (fsm_ns_wr_addr),
    .ns_wr_data  (fsm_ns_wr_data),
    .out_wr_en   (fsm_out_wr_en),
    .out_wr_addr (fsm_out_wr_addr),
    .out_wr_data (fsm_out_wr_data)
  );

  onehot_mux u_onehot (
    .clk, .rst,
    .in  (oh_in),
    .out (oh_out)
  );

  pctrl_unit u_pctrl (
    .clk, .rst,
    .req_valid      (pc_req_valid),
    .req            (pc_req),
    .req_ready      (pc_req_ready),
    .pipe_cmd_valid (pc_pipe_cmd_valid),
    .pipe_cmd       (pc_pipe_cmd),
    .pipe_cmd_ready (pc_pipe_cmd_ready),
    .pipe_rsp_valid (pc_pipe_rsp_valid),
    .pipe_rsp       (pc_pipe_rsp),
    .pipe_rsp_ready (pc_pipe_rsp_ready),
    .out_valid      (pc_out_valid),
    .out            (pc_out),
    .out_ready      (pc_out_ready),
    .reply_valid    (pc_reply_valid),
    .reply          (pc_reply),
    .upc            (pc_upc),
    .grant          (pc_grant),
    .disp_wr_en     (pc_disp_wr_en),
    .disp_wr_addr   (pc_disp_wr_addr),
    .disp_wr_data   (pc_disp_wr_data),
    .uc_wr_en       (pc_uc_wr_en),
    .uc_wr_addr     (pc_uc_wr_addr),
    .uc_wr_data     (pc_uc_wr_data)
  );

endmodule
