// fsm_sweep_point: one size point of the table-based FSM sweep.
//
// Builds a constant-table table_fsm with M inputs, S states and N outputs.
// Entry i of the next-state table is h(i) mod S and of the output table the
// low N bits of h(i + 12345), with h(x) = (x * 2654435761) >> 11 on 32 bits,
// so every state is a legal one. A model steps the same tables; state and
// outputs are compared every cycle for CYCLES random inputs.
module fsm_sweep_point #(
  parameter int unsigned M      = 2,
  parameter int unsigned S      = 2,
  parameter int unsigned N      = 2,
  parameter int unsigned CYCLES = 300
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned D  = 2 ** (SW + M);

  function automatic logic [31:0] h(logic [31:0] x);
    logic [63:0] p;
    p = 64'(x) * 64'd2654435761;
    return p[42:11];
  endfunction
  function automatic logic [D*SW-1:0] ns_tab();
    logic [D*SW-1:0] t;
    for (int i = 0; i < D; i++) t[i*SW +: SW] = SW'(h(i) % S);
    return t;
  endfunction
  function automatic logic [D*N-1:0] out_tab();
    logic [D*N-1:0] t;
    for (int i = 0; i < D; i++) t[i*N +: N] = N'(h(i + 12345));
    return t;
  endfunction

  logic [M-1:0]  in;
  logic [N-1:0]  out;
  logic [SW-1:0] state, ms;

  table_fsm #(.M(M), .S(S), .N(N), .PROGRAMMABLE(0),
              .NS_INIT(ns_tab()), .OUT_INIT(out_tab())) dut (
    .clk, .rst, .in, .out, .state,
    .ns_wr_en(1'b0), .ns_wr_addr('0), .ns_wr_data('0),
    .out_wr_en(1'b0), .out_wr_addr('0), .out_wr_data('0));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL fsm m=%0d s=%0d n=%0d %s: got %0h expected %0h", M, S, N, what, got, exp);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; in = '0;
    @(negedge rst);
    @(negedge clk);
    ms = '0;
    check("reset state", state, 0);
    for (int c = 0; c < CYCLES; c++) begin
      in = M'($urandom);
      #1;
      check("out", out, N'(h(32'({ms, in}) + 12345)));
      @(posedge clk);
      ms = SW'(h(32'({ms, in})) % S);
      @(negedge clk);
      check("state", state, ms);
    end
    done = 1;
  end
endmodule
