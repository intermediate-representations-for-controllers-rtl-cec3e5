// tb_onehot_mux: checks the decoder / flop / AND / mux example.
//
// Instances at widths 8 (no reset, synchronous reset, asynchronous reset),
// 2 and 128 are driven with random inputs; each output must equal the
// one-hot code of the input of the previous clock (1 << in), i.e. the mux
// must never zero the word. During reset the synchronous and asynchronous
// versions must output zero, the asynchronous one without waiting for an edge.
module tb_onehot_mux;
  import ctrl_pkg::*;

  logic clk = 0, rst = 1;
  logic [2:0] in8;
  logic [0:0] in2;
  logic [6:0] in128;
  logic [7:0] o_none, o_sync, o_async;
  logic [1:0] o2;
  logic [127:0] o128;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  onehot_mux #(.N(8), .RESET_MODE(RST_NONE))  dut_none  (.clk, .rst, .in(in8), .out(o_none));
  onehot_mux #(.N(8), .RESET_MODE(RST_SYNC))  dut_sync  (.clk, .rst, .in(in8), .out(o_sync));
  onehot_mux #(.N(8), .RESET_MODE(RST_ASYNC)) dut_async (.clk, .rst, .in(in8), .out(o_async));
  onehot_mux #(.N(2))                         dut_2     (.clk, .rst, .in(in2), .out(o2));
  onehot_mux #(.N(128))                       dut_128   (.clk, .rst, .in(in128), .out(o128));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
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
    logic [2:0] p8;
    logic [0:0] p2;
    logic [6:0] p128;
    in8 = 3'd5; in2 = 0; in128 = 0;
    repeat (3) @(negedge clk);
    check("sync in reset", o_sync, 0);
    check("async in reset", o_async, 0);
    check("none loads during reset", o_none, 8'h20);
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (n == 0) rst = 0;
      p8 = in8; p2 = in2; p128 = in128;
      in8 = 3'($urandom); in2 = 1'($urandom); in128 = 7'($urandom);
      @(posedge clk);
      #1;
      check("none", o_none, 8'(1) << in8);
      check("sync", o_sync, 8'(1) << in8);
      check("async", o_async, 8'(1) << in8);
      check("n=2", o2, 2'(1) << in2);
      check("n=128", o128, 128'(1) << in128);
    end
    // asynchronous reset acts between edges
    @(negedge clk);
    rst = 1;
    #1;
    check("async clears without a clock", o_async, 0);
    check("sync waits for the clock", o_sync, 8'(1) << in8);
    @(posedge clk);
    #1;
    check("sync cleared at the clock", o_sync, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
