// table_fsm: a finite state machine whose two logic clouds are tables.
//
// A state register of SW = clog2(S) bits holds the current state. The
// next-state memory (SW bits wide) and the output memory (N bits wide) are
// both addressed by {state, in}, so with the default M = 5 inputs, S = 4
// states and N = 3 outputs each memory has 2 + 5 = 7 address bits and 128
// entries. With MEALY = 0 the output memory is addressed by the state alone
// (Moore style) and has 2**SW entries.
//
// Each memory is a cfg_table, so the whole FSM is either programmable
// (PROGRAMMABLE = 1: reset loads NS_INIT / OUT_INIT, write ports reprogram
// it) or fixed (PROGRAMMABLE = 0: tables are constants that synthesis folds).
// Table entry index is {state, in} with the state in the high bits.
//
// Timing: out is combinational from state (and in); state updates on the
// rising clock edge. Synchronous reset puts the FSM in state 0. The two-memory
// structure and the default sizes follow the described FSM; the reset state,
// the address bit order and the write ports are this design's choices.
module table_fsm #(
  parameter int unsigned M            = 5,
  parameter int unsigned S            = 4,
  parameter int unsigned N            = 3,
  parameter bit          MEALY        = 1'b1,
  parameter bit          PROGRAMMABLE = 1'b1,
  localparam int unsigned SW          = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned NAW         = SW + M,
  localparam int unsigned OAW         = MEALY ? SW + M : SW,
  parameter logic [(2**NAW)*SW-1:0] NS_INIT  = '0,
  parameter logic [(2**OAW)*N-1:0]  OUT_INIT = '0
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [M-1:0]   in,
  output logic [N-1:0]   out,
  output logic [SW-1:0]  state,
  // next-state memory write port
  input  logic           ns_wr_en,
  input  logic [NAW-1:0] ns_wr_addr,
  input  logic [SW-1:0]  ns_wr_data,
  // output memory write port
  input  logic           out_wr_en,
  input  logic [OAW-1:0] out_wr_addr,
  input  logic [N-1:0]   out_wr_data
);

  logic [SW-1:0]  next_state;
  logic [OAW-1:0] out_addr;

  cfg_table #(.AW(NAW), .DW(SW), .PROGRAMMABLE(PROGRAMMABLE), .INIT(NS_INIT)) u_ns_mem (
    .clk, .rst,
    .addr    ({state, in}),
    .data    (next_state),
    .wr_en   (ns_wr_en),
    .wr_addr (ns_wr_addr),
    .wr_data (ns_wr_data)
  );

  if (MEALY) begin : g_mealy
    assign out_addr = {state, in};
  end else begin : g_moore
    assign out_addr = state;
  end

  cfg_table #(.AW(OAW), .DW(N), .PROGRAMMABLE(PROGRAMMABLE), .INIT(OUT_INIT)) u_out_mem (
    .clk, .rst,
    .addr    (out_addr),
    .data    (out),
    .wr_en   (out_wr_en),
    .wr_addr (out_wr_addr),
    .wr_data (out_wr_data)
  );

  always_ff @(posedge clk) begin
    if (rst) state <= '0;
    else     state <= next_state;
  end

endmodule
