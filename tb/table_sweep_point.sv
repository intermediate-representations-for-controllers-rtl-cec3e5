// table_sweep_point: one size point of the combinational-table sweep.
//
// A table of depth 2**AW and width DW, in both builds: constant (entry i is
// the low DW bits of {h(i), h(i + 1)}, h as in fsm_sweep_point) and
// programmable (same reset contents, then random writes). Random reads are
// compared with the model.
module table_sweep_point #(
  parameter int unsigned AW     = 1,
  parameter int unsigned DW     = 2,
  parameter int unsigned CYCLES = 300
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int unsigned D = 2 ** AW;

  function automatic logic [31:0] h(logic [31:0] x);
    logic [63:0] p;
    p = 64'(x) * 64'd2654435761;
    return p[42:11];
  endfunction
  function automatic logic [DW-1:0] entry(int i);
    return DW'({h(i), h(i + 1)});
  endfunction
  function automatic logic [D*DW-1:0] tab();
    logic [D*DW-1:0] t;
    for (int i = 0; i < D; i++) t[i*DW +: DW] = entry(i);
    return t;
  endfunction

  logic [AW-1:0] addr, wr_addr;
  logic [DW-1:0] dc, dp, wr_data;
  logic          wr_en;
  logic [DW-1:0] model [D];

  cfg_table #(.AW(AW), .DW(DW), .PROGRAMMABLE(0), .INIT(tab())) u_c (
    .clk, .rst, .addr, .data(dc), .wr_en, .wr_addr, .wr_data);
  cfg_table #(.AW(AW), .DW(DW), .PROGRAMMABLE(1), .INIT(tab())) u_p (
    .clk, .rst, .addr, .data(dp), .wr_en, .wr_addr, .wr_data);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL table d=%0d w=%0d %s: got %0h expected %0h", D, DW, what, got, exp);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    addr = '0; wr_addr = '0; wr_data = '0; wr_en = 0;
    for (int i = 0; i < D; i++) model[i] = entry(i);
    @(negedge rst);
    @(negedge clk);
    for (int c = 0; c < CYCLES; c++) begin
      addr    = AW'($urandom);
      wr_en   = (c % 2) == 1;
      wr_addr = AW'($urandom);
      wr_data = DW'({$urandom, $urandom});
      #1;
      check("constant", dc, entry(int'(addr)));
      check("programmable", dp, model[addr]);
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
    end
    done = 1;
  end
endmodule
