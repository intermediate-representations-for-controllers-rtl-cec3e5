// onehot_mux: small circuit that shows state propagation across a flop.
//
// A decoder turns the clog2(N)-bit input into an N-bit one-hot word, which is
// registered as y. The AND of all bits of y selects a 2:1 mux: select 0 passes
// y to out, select 1 passes all zeros (ground). Whenever y is one-hot and
// N >= 2 the AND is 0, so out always equals y and the mux and AND are logically
// redundant; removing them needs the knowledge that y is one-hot after the
// flop. The assertion below states that knowledge for simulation and formal
// tools.
//
// RESET_MODE picks the flop: RST_NONE (no reset), RST_SYNC or RST_ASYNC
// (active-high reset to all zeros). Timing: out follows in with one clock of
// latency. The decoder, flop, AND and mux follow the described example; the
// reset value and the default width are this design's choices. During reset y
// is zero, not one-hot, and out is zero.
module onehot_mux
  import ctrl_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter rst_mode_e   RESET_MODE = RST_SYNC,
  localparam int unsigned LW        = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [LW-1:0] in,
  output logic [N-1:0]  out
);

  logic [N-1:0] dec;
  logic [N-1:0] y;
  logic         all_ones;

  // Dec: one-hot decoder
  always_comb begin
    dec = '0;
    dec[in] = 1'b1;
  end

  if (RESET_MODE == RST_ASYNC) begin : g_async
    always_ff @(posedge clk or posedge rst) begin
      if (rst) y <= '0;
      else     y <= dec;
    end
  end else if (RESET_MODE == RST_SYNC) begin : g_sync
    always_ff @(posedge clk) begin
      if (rst) y <= '0;
      else     y <= dec;
    end
  end else begin : g_none
    logic unused_rst;
    assign unused_rst = rst;
    always_ff @(posedge clk) y <= dec;
  end

  assign all_ones = &y;
  assign out      = all_ones ? '0 : y;

  // y is one-hot from the first clock after reset (the input must address one
  // of the N outputs).
  a_y_onehot: assert property (@(posedge clk) disable iff (rst) !$past(rst) |-> $onehot(y))
    else $error("onehot_mux: y is not one-hot");

endmodule
