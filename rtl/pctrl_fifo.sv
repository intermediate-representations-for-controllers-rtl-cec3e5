// pctrl_fifo: queue between the Dispatch block and a data pipe, or between a
// data pipe and the units it feeds.
//
// A synchronous first-in first-out buffer of DEPTH entries of type T, built
// as a circular array with read and write pointers and an occupancy count.
// Interface: in_valid/in_ready/in_data push side, out_valid/out_ready/out_data
// pop side; an item moves when valid and ready are both high at a rising
// edge. in_ready is low only when the queue is full; out_valid is high when it
// is not empty. A push and a pop may happen in the same cycle, also when full.
// Timing: an item pushed in one cycle can be popped in the next (one cycle of
// latency, no bypass). Synchronous reset empties it. The queues' positions
// follow the described unit; depth and handshake are this design's choices.
module pctrl_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter type         T     = logic [7:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T              mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic          push, pop;

  assign out_valid = (count != 0);
  assign in_ready  = (int'(count) < DEPTH) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= in_data;
        wr_ptr      <= incr(wr_ptr);
      end
      if (pop) rd_ptr <= incr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) int'(count) <= DEPTH);

endmodule
