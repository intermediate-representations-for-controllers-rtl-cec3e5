// tb_pctrl_arb: checks the round-robin arbiter with three requesters.
//
// Random valid patterns and random out_ready. A testbench model keeps the
// priority pointer: the granted requester is the first valid one at or after
// the pointer (wrapping), and after an accepted transfer the pointer moves to
// the one after the winner. Checked every cycle: out_valid, grant, out_data
// (each requester offers its own index in the data), in_ready. With all three
// always requesting, the grants must rotate 0, 1, 2, 0, ...
module tb_pctrl_arb;
  localparam int unsigned NREQ = 3;

  logic clk = 0, rst = 1;
  logic [NREQ-1:0] in_valid = 0, in_ready, grant;
  logic [7:0] in_data [NREQ];
  logic out_valid, out_ready = 0;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int prio = 0, contended = 0;

  always #5 clk = ~clk;

  pctrl_arb #(.NREQ(NREQ), .T(logic [7:0])) dut (
    .clk, .rst, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready, .grant);

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
    int win;
    for (int i = 0; i < NREQ; i++) in_data[i] = 8'(8'hA0 + i);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      in_valid  = (n < 30) ? '1 : NREQ'($urandom);
      out_ready = (n < 30) ? 1'b1 : 1'($urandom);
      #1;
      win = -1;
      for (int k = 0; k < NREQ; k++)
        if (win < 0 && in_valid[(prio + k) % NREQ]) win = (prio + k) % NREQ;
      if ($countones(in_valid) > 1) contended++;
      check("out_valid", out_valid, in_valid != 0);
      if (win >= 0) begin
        check("grant", grant, 1 << win);
        check("data", out_data, 8'hA0 + win);
        check("in_ready", in_ready, out_ready ? (1 << win) : 0);
        if (n < 30) check("rotation", win, n % NREQ);
      end else begin
        check("no grant", grant, 0);
        check("no ready", in_ready, 0);
      end
      @(posedge clk);
      if (win >= 0 && out_ready) prio = (win + 1) % NREQ;
      @(negedge clk);
    end
    check("contention seen", int'(contended > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
