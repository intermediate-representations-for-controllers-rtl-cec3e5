// tb_pctrl_dispatch: checks the microcoded Dispatch block in four
// configurations, each against the command-level model in dispatch_harness:
//   8-word lines, single-word access, cached, programmable (the default);
//   8-word lines, double-word access, cached, constant tables;
//   16-word lines, single-word access, cached, programmable;
//   uncached (word operations only), programmable.
// Each configuration must see stalls, back-to-back dispatch, error replies
// (cached ones also line transfers).
module tb_pctrl_dispatch;
  logic clk = 0, rst = 1;
  int c[4], f[4], st[4], bb[4], er[4], xf[4];
  bit d[4];
  int checks, failures;

  always #5 clk = ~clk;

  dispatch_harness #(.LINE_WORDS(8),  .DBL(0), .CACHED(1), .PROGRAMMABLE(1)) h0 (
    .clk, .rst, .checks(c[0]), .failures(f[0]), .n_stall(st[0]), .n_back2back(bb[0]),
    .n_err(er[0]), .n_xfer(xf[0]), .done(d[0]));
  dispatch_harness #(.LINE_WORDS(8),  .DBL(1), .CACHED(1), .PROGRAMMABLE(0)) h1 (
    .clk, .rst, .checks(c[1]), .failures(f[1]), .n_stall(st[1]), .n_back2back(bb[1]),
    .n_err(er[1]), .n_xfer(xf[1]), .done(d[1]));
  dispatch_harness #(.LINE_WORDS(16), .DBL(0), .CACHED(1), .PROGRAMMABLE(1)) h2 (
    .clk, .rst, .checks(c[2]), .failures(f[2]), .n_stall(st[2]), .n_back2back(bb[2]),
    .n_err(er[2]), .n_xfer(xf[2]), .done(d[2]));
  dispatch_harness #(.LINE_WORDS(8),  .DBL(0), .CACHED(0), .PROGRAMMABLE(1)) h3 (
    .clk, .rst, .checks(c[3]), .failures(f[3]), .n_stall(st[3]), .n_back2back(bb[3]),
    .n_err(er[3]), .n_xfer(xf[3]), .done(d[3]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum() , f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = c.sum();
    failures = f.sum();
    for (int i = 0; i < 4; i++) begin
      $display("config %0d: checks=%0d stalls=%0d back-to-back=%0d errors=%0d transfers=%0d",
               i, c[i], st[i], bb[i], er[i], xf[i]);
      checks += 3;
      if (st[i] == 0) begin failures++; $display("FAIL config %0d: no stall", i); end
      if (bb[i] == 0) begin failures++; $display("FAIL config %0d: no back-to-back dispatch", i); end
      if (er[i] == 0) begin failures++; $display("FAIL config %0d: no error reply", i); end
      if (i < 3) begin
        checks++;
        if (xf[i] == 0) begin failures++; $display("FAIL config %0d: no transfer", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
