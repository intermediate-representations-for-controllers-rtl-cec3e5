// tb_table_fsm: checks the table-based FSM at its default size (5 inputs,
// 4 states, 3 outputs, Mealy outputs, 128-entry memories).
//
// Random next-state and output tables are written through the write ports
// of a programmable instance; a reference model in the testbench holds the
// same tables and steps its own state. A second, constant-table instance is
// built with the contents (7 * i + 3) mod 4 / (5 * i + 1) mod 8 and checked
// against its own model, and a Moore instance checks that its outputs follow
// the state only. Every cycle the state and outputs are compared, and the
// reset state 0 is checked.
module tb_table_fsm;
  localparam int unsigned M = 5, S = 4, N = 3, SW = 2;
  localparam int unsigned D = 2 ** (SW + M);

  function automatic logic [D*SW-1:0] ns_tab();
    logic [D*SW-1:0] t;
    for (int i = 0; i < D; i++) t[i*SW +: SW] = SW'((7 * i + 3) % 4);
    return t;
  endfunction
  function automatic logic [D*N-1:0] out_tab();
    logic [D*N-1:0] t;
    for (int i = 0; i < D; i++) t[i*N +: N] = N'((5 * i + 1) % 8);
    return t;
  endfunction
  function automatic logic [(2**SW)*N-1:0] moore_tab();
    return {3'd6, 3'd3, 3'd5, 3'd1};  // state 0 -> 1, 1 -> 5, 2 -> 3, 3 -> 6
  endfunction

  logic clk = 0, rst = 1;
  logic [M-1:0] in;
  logic [N-1:0] out_p, out_c, out_m;
  logic [SW-1:0] st_p, st_c, st_m;
  logic ns_wr_en = 0, out_wr_en = 0;
  logic [SW+M-1:0] ns_wr_addr, out_wr_addr;
  logic [SW-1:0] ns_wr_data;
  logic [N-1:0] out_wr_data;
  int checks = 0, failures = 0;

  logic [SW-1:0] ns_model [D];
  logic [N-1:0]  out_model [D];
  logic [SW-1:0] ms_p, ms_c, ms_m;

  always #5 clk = ~clk;

  table_fsm #(.PROGRAMMABLE(1)) dut_p (
    .clk, .rst, .in, .out(out_p), .state(st_p),
    .ns_wr_en, .ns_wr_addr, .ns_wr_data, .out_wr_en, .out_wr_addr, .out_wr_data);
  table_fsm #(.PROGRAMMABLE(0), .NS_INIT(ns_tab()), .OUT_INIT(out_tab())) dut_c (
    .clk, .rst, .in, .out(out_c), .state(st_c),
    .ns_wr_en(1'b0), .ns_wr_addr('0), .ns_wr_data('0),
    .out_wr_en(1'b0), .out_wr_addr('0), .out_wr_data('0));
  table_fsm #(.PROGRAMMABLE(0), .MEALY(0), .NS_INIT(ns_tab()), .OUT_INIT(moore_tab())) dut_m (
    .clk, .rst, .in, .out(out_m), .state(st_m),
    .ns_wr_en(1'b0), .ns_wr_addr('0), .ns_wr_data('0),
    .out_wr_en(1'b0), .out_wr_addr('0), .out_wr_data('0));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int moore [4];
    moore = '{1, 5, 3, 6};
    in = 0; ns_wr_addr = 0; ns_wr_data = 0; out_wr_addr = 0; out_wr_data = 0;
    // reset: state 0 in all three, and the programmable tables hold their
    // (all-zero) reset contents
    repeat (2) @(negedge clk);
    check("reset state p", st_p, 0);
    check("reset state c", st_c, 0);
    check("reset state m", st_m, 0);
    check("reset table p", out_p, 0);
    rst = 0;
    // program the flexible instance, one entry of each memory per clock
    for (int i = 0; i < D; i++) begin
      ns_model[i]  = SW'($urandom);
      out_model[i] = N'($urandom);
      ns_wr_en = 1; ns_wr_addr = (SW+M)'(i); ns_wr_data = ns_model[i];
      out_wr_en = 1; out_wr_addr = (SW+M)'(i); out_wr_data = out_model[i];
      @(negedge clk);
    end
    ns_wr_en = 0; out_wr_en = 0;
    // the programmable FSM has been wandering through a partly written
    // table; take its state from the DUT once and follow it from there
    ms_p = st_p;
    ms_c = st_c;
    ms_m = st_m;
    for (int n = 0; n < 2000; n++) begin
      in = M'($urandom);
      #1;
      check("out p", out_p, out_model[{ms_p, in}]);
      check("out c", out_c, (5 * int'({ms_c, in}) + 1) % 8);
      check("out m (moore)", out_m, moore[ms_m]);
      @(posedge clk);
      ms_p = ns_model[{ms_p, in}];
      ms_c = SW'((7 * int'({ms_c, in}) + 3) % 4);
      ms_m = SW'((7 * int'({ms_m, in}) + 3) % 4);
      @(negedge clk);
      check("state p", st_p, ms_p);
      check("state c", st_c, ms_c);
      check("state m", st_m, ms_m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
