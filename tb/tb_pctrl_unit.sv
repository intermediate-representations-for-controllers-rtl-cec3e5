// tb_pctrl_unit: one protocol-controller unit (default configuration:
// cached, 8-word lines, single-word access, programmable microcode, 4-deep
// queues) driven and checked end to end by pctrl_harness, including three
// reprogrammings of its microcode.
module tb_pctrl_unit;
  import ctrl_pkg::*;

  logic clk = 0, rst = 1;
  logic [NUM_REQ-1:0]   req_valid, req_ready, grant;
  pctrl_req_t           req [NUM_REQ];
  logic [NUM_PIPES-1:0] pipe_cmd_valid, pipe_cmd_ready, pipe_rsp_valid, pipe_rsp_ready;
  logic [NUM_PIPES-1:0] out_valid, out_ready;
  pipe_cmd_t            pipe_cmd [NUM_PIPES];
  pipe_rsp_t            pipe_rsp [NUM_PIPES];
  pipe_rsp_t            out [NUM_PIPES];
  logic                 reply_valid;
  reply_t               reply;
  logic [UPC_W-1:0]     upc;
  logic                 disp_wr_en, uc_wr_en;
  logic [OP_W-1:0]      disp_wr_addr;
  logic [UPC_W-1:0]     disp_wr_data, uc_wr_addr;
  logic [UW-1:0]        uc_wr_data;
  int checks, failures;
  bit done;

  always #5 clk = ~clk;

  pctrl_unit dut (.*);

  pctrl_harness #(.PHASE_CYCLES(1500)) harness (.*);

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
