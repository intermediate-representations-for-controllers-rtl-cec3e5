// tb_ctrl_ir_top: end-to-end test of the whole design at its default
// parameters.
//
// The protocol-controller unit is driven and checked by pctrl_harness: random
// requests from three units, data-pipe models with random back-pressure, four
// configurations reached by rewriting the microcode through the top's
// configuration ports. In parallel the table-based FSM is programmed through
// its write ports with random 128-entry next-state and output tables and run
// against a reference model on random inputs, and the one-hot example is fed
// random inputs and must output 1 << in one clock later. Counted mechanisms:
// those of pctrl_harness, plus FSM reprogramming, FSM state changes and every
// FSM state visited.
module tb_ctrl_ir_top;
  import ctrl_pkg::*;

  logic clk = 0, rst = 1;
  // FSM
  logic [4:0] fsm_in;
  logic [2:0] fsm_out;
  logic [1:0] fsm_state;
  logic       fsm_ns_wr_en = 0, fsm_out_wr_en = 0;
  logic [6:0] fsm_ns_wr_addr = 0, fsm_out_wr_addr = 0;
  logic [1:0] fsm_ns_wr_data = 0;
  logic [2:0] fsm_out_wr_data = 0;
  // one-hot example
  logic [2:0] oh_in;
  logic [7:0] oh_out;
  // protocol controller
  logic [NUM_REQ-1:0]   pc_req_valid, pc_req_ready, pc_grant;
  pctrl_req_t           pc_req [NUM_REQ];
  logic [NUM_PIPES-1:0] pc_pipe_cmd_valid, pc_pipe_cmd_ready, pc_pipe_rsp_valid, pc_pipe_rsp_ready;
  logic [NUM_PIPES-1:0] pc_out_valid, pc_out_ready;
  pipe_cmd_t            pc_pipe_cmd [NUM_PIPES];
  pipe_rsp_t            pc_pipe_rsp [NUM_PIPES];
  pipe_rsp_t            pc_out [NUM_PIPES];
  logic                 pc_reply_valid;
  reply_t               pc_reply;
  logic [UPC_W-1:0]     pc_upc;
  logic                 pc_disp_wr_en, pc_uc_wr_en;
  logic [OP_W-1:0]      pc_disp_wr_addr;
  logic [UPC_W-1:0]     pc_disp_wr_data, pc_uc_wr_addr;
  logic [UW-1:0]        pc_uc_wr_data;

  int pc_checks, pc_failures;
  bit pc_done;
  int checks = 0, failures = 0;
  int fsm_moves = 0, fsm_programs = 0;
  bit [3:0] fsm_seen = '0;

  always #5 clk = ~clk;

  ctrl_ir_top dut (.*);

  pctrl_harness #(.PHASE_CYCLES(1500)) harness (
    .clk, .rst,
    .req_valid (pc_req_valid), .req (pc_req), .req_ready (pc_req_ready),
    .pipe_cmd_valid (pc_pipe_cmd_valid), .pipe_cmd (pc_pipe_cmd), .pipe_cmd_ready (pc_pipe_cmd_ready),
    .pipe_rsp_valid (pc_pipe_rsp_valid), .pipe_rsp (pc_pipe_rsp), .pipe_rsp_ready (pc_pipe_rsp_ready),
    .out_valid (pc_out_valid), .out (pc_out), .out_ready (pc_out_ready),
    .reply_valid (pc_reply_valid), .reply (pc_reply), .upc (pc_upc), .grant (pc_grant),
    .disp_wr_en (pc_disp_wr_en), .disp_wr_addr (pc_disp_wr_addr), .disp_wr_data (pc_disp_wr_data),
    .uc_wr_en (pc_uc_wr_en), .uc_wr_addr (pc_uc_wr_addr), .uc_wr_data (pc_uc_wr_data),
    .checks (pc_checks), .failures (pc_failures), .done (pc_done));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + pc_checks, failures + pc_failures + 1);
    $finish;
  end

  // FSM: program, run, reprogram, run
  initial begin
    logic [1:0] ns_m [128];
    logic [2:0] out_m [128];
    logic [1:0] st;
    fsm_in = 0;
    repeat (3) @(negedge clk);
    check("fsm reset state", fsm_state, 0);
    rst = 0;
    for (int round = 0; round < 2; round++) begin
      for (int i = 0; i < 128; i++) begin
        ns_m[i] = 2'($urandom); out_m[i] = 3'($urandom);
        fsm_ns_wr_en = 1; fsm_ns_wr_addr = 7'(i); fsm_ns_wr_data = ns_m[i];
        fsm_out_wr_en = 1; fsm_out_wr_addr = 7'(i); fsm_out_wr_data = out_m[i];
        @(negedge clk);
      end
      fsm_ns_wr_en = 0; fsm_out_wr_en = 0;
      fsm_programs++;
      st = fsm_state;
      for (int n = 0; n < 1500; n++) begin
        fsm_in = 5'($urandom);
        #1;
        check("fsm out", fsm_out, out_m[{st, fsm_in}]);
        @(posedge clk);
        if (ns_m[{st, fsm_in}] != st) fsm_moves++;
        st = ns_m[{st, fsm_in}];
        fsm_seen[st] = 1'b1;
        @(negedge clk);
        check("fsm state", fsm_state, st);
      end
    end
  end

  // one-hot example
  initial begin
    oh_in = 0;
    @(negedge rst);
    forever begin
      @(negedge clk);
      oh_in = 3'($urandom);
      @(posedge clk);
      #1;
      check("onehot out", oh_out, 8'(1) << oh_in);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    wait (pc_done);
    check("mechanism: fsm reprogrammed", fsm_programs, 2);
    check("mechanism: fsm state changes", int'(fsm_moves > 100), 1);
    check("mechanism: all fsm states visited", fsm_seen, 4'hF);
    $display("fsm: programs=%0d moves=%0d", fsm_programs, fsm_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks + pc_checks, failures + pc_failures);
    $finish;
  end
endmodule
