// tb_cfg_table: checks the configurable truth table in both builds.
//
// A programmable 16 x 8 table and a constant one get the same initial
// contents, entry i = (i * 37 + 5) mod 256. The test checks that reset loads
// the contents, that every address reads its entry combinationally in both
// builds, that writes change the programmable table at the next edge (one
// entry at a time) and that the constant table ignores its write port.
module tb_cfg_table;
  localparam int unsigned AW = 4;
  localparam int unsigned DW = 8;
  localparam int unsigned D  = 2 ** AW;

  function automatic logic [D*DW-1:0] init_tab();
    logic [D*DW-1:0] t;
    for (int i = 0; i < D; i++) t[i*DW +: DW] = DW'((i * 37 + 5) % 256);
    return t;
  endfunction
  localparam logic [D*DW-1:0] INIT = init_tab();

  logic clk = 0, rst = 1;
  logic [AW-1:0] addr, wr_addr;
  logic [DW-1:0] data_p, data_c, wr_data;
  logic wr_en = 0;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [D];

  always #5 clk = ~clk;

  cfg_table #(.AW(AW), .DW(DW), .PROGRAMMABLE(1), .INIT(INIT)) dut_p (
    .clk, .rst, .addr, .data(data_p), .wr_en, .wr_addr, .wr_data);
  cfg_table #(.AW(AW), .DW(DW), .PROGRAMMABLE(0), .INIT(INIT)) dut_c (
    .clk, .rst, .addr, .data(data_c), .wr_en, .wr_addr, .wr_data);

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: addr %0d got %0h expected %0h", what, addr, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < D; i++) model[i] = DW'((i * 37 + 5) % 256);
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // reset contents, both builds
    for (int i = 0; i < D; i++) begin
      addr = AW'(i); #1;
      check("programmable after reset", data_p, model[i]);
      check("constant", data_c, model[i]);
    end
    // random writes, one per clock, then read back
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      wr_en   = 1;
      wr_addr = AW'($urandom);
      wr_data = DW'($urandom);
      addr    = wr_addr;
      #1;
      // write not yet visible before the edge
      check("before write edge", data_p, model[wr_addr]);
      @(posedge clk);
      model[wr_addr] = wr_data;
      #1;
      check("after write edge", data_p, model[wr_addr]);
      check("constant ignores writes", data_c, DW'((int'(wr_addr) * 37 + 5) % 256));
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < D; i++) begin
      addr = AW'(i); #1;
      check("final contents", data_p, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
