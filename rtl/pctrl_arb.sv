// pctrl_arb: round-robin arbiter in front of the Dispatch block.
//
// NREQ requesters each offer one item (type T) with a valid/ready handshake.
// The arbiter forwards one of them to a single valid/ready output. Priority
// rotates: after a grant is accepted, the requester just served gets the
// lowest priority, so every waiting requester is served within NREQ accepted
// transfers.
//
// Interface: in_valid/in_data/in_ready per requester, out_valid/out_data/
// out_ready towards Dispatch, grant (one-hot) shows the chosen requester.
// out_valid depends only on in_valid; in_ready = out_ready for the granted
// requester. Timing: combinational choice, priority pointer updated at the
// rising clock edge after a transfer. The arbiter position and its three
// inputs follow the described unit; the round-robin policy is this design's
// choice.
module pctrl_arb #(
  parameter int unsigned NREQ = 3,
  parameter type         T    = logic [7:0]
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NREQ-1:0] in_valid,
  input  T                in_data [NREQ],
  output logic [NREQ-1:0] in_ready,
  output logic            out_valid,
  output T                out_data,
  input  logic            out_ready,
  output logic [NREQ-1:0] grant
);

  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [IW-1:0] prio;      // requester with the highest priority
  logic [IW-1:0] sel;

  always_comb begin
    int idx;
    sel   = '0;
    grant = '0;
    for (int unsigned k = NREQ; k > 0; k--) begin
      // scan from the lowest priority up, so the last hit has top priority
      idx = (int'(prio) + int'(k) - 1) % NREQ;
      if (in_valid[idx]) begin
        sel = IW'(idx);
      end
    end
    if (|in_valid) grant[sel] = 1'b1;
  end

  assign out_valid = |in_valid;
  assign out_data  = in_data[sel];
  assign in_ready  = out_ready ? grant : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      prio <= '0;
    end else if (out_valid && out_ready) begin
      prio <= (int'(sel) == NREQ - 1) ? '0 : sel + 1'b1;
    end
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (rst) out_valid |-> $onehot(grant));

endmodule
