// tb_pctrl_fifo: checks the queue against a testbench model.
//
// A depth-4 queue of bytes is pushed and popped at random (including pushes
// while full with a pop in the same cycle). Every cycle the testbench checks
// out_valid, in_ready, count and the head item against a model queue, and
// counts how often the queue was full and a push was refused.
module tb_pctrl_fifo;
  localparam int unsigned DEPTH = 4;

  logic clk = 0, rst = 1;
  logic in_valid = 0, out_ready = 0, in_ready, out_valid;
  logic [7:0] in_data = 0, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0, fulls = 0, refused = 0;
  logic [7:0] q [$];

  always #5 clk = ~clk;

  pctrl_fifo #(.DEPTH(DEPTH), .T(logic [7:0])) dut (
    .clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .count);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit push, pop;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      // phases: mostly pushing, then mostly popping
      in_valid  = ($urandom % 8) < ((n / 200) % 2 ? 3 : 6);
      out_ready = ($urandom % 8) < ((n / 200) % 2 ? 6 : 3);
      in_data   = 8'($urandom);
      #1;
      check("count", count, q.size());
      check("out_valid", out_valid, q.size() != 0);
      check("in_ready", in_ready, (q.size() < DEPTH) || out_ready);
      if (q.size() != 0) check("head", out_data, q[0]);
      if (q.size() == DEPTH) fulls++;
      if (in_valid && !in_ready) refused++;
      push = in_valid && in_ready;
      pop  = out_valid && out_ready;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(in_data);
      @(negedge clk);
    end
    check("queue became full", int'(fulls > 10), 1);
    check("push refused when full", int'(refused > 10), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
