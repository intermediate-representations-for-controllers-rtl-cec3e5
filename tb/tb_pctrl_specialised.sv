// tb_pctrl_specialised: the protocol-controller unit built with constant
// microcode (PROGRAMMABLE = 0), the form a generator produces for one fixed
// memory configuration, in the two configurations compared for area:
//   cached   (8-word lines, single-word access: line reads, writes,
//             transfers and word operations);
//   uncached (word operations only; line operations get an error reply).
// A third instance is cached with 16-word lines and double-word access. Each
// is driven and checked by its own pctrl_harness with reprogramming off; the
// configuration ports are tied off because the tables are constants.
module tb_pctrl_specialised;
  import ctrl_pkg::*;

  localparam int NU = 3;
  localparam int unsigned LWS [NU] = '{8, 8, 16};
  localparam bit          DBS [NU] = '{0, 0, 1};
  localparam bit          CAS [NU] = '{1, 0, 1};

  logic clk = 0, rst = 1;
  int c [NU], f [NU];
  bit d [NU];

  always #5 clk = ~clk;

  for (genvar u = 0; u < NU; u++) begin : g_u
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

    pctrl_unit #(.LINE_WORDS(LWS[u]), .DBL(DBS[u]), .CACHED(CAS[u]), .PROGRAMMABLE(0)) dut (
      .clk, .rst, .req_valid, .req, .req_ready,
      .pipe_cmd_valid, .pipe_cmd, .pipe_cmd_ready,
      .pipe_rsp_valid, .pipe_rsp, .pipe_rsp_ready,
      .out_valid, .out, .out_ready, .reply_valid, .reply, .upc, .grant,
      .disp_wr_en(1'b0), .disp_wr_addr('0), .disp_wr_data('0),
      .uc_wr_en(1'b0), .uc_wr_addr('0), .uc_wr_data('0));

    pctrl_harness #(.PHASE_CYCLES(1000), .REPROGRAM(0),
                    .LW0(LWS[u]), .DBL0(DBS[u]), .CACHED0(CAS[u])) harness (
      .clk, .rst, .req_valid, .req, .req_ready,
      .pipe_cmd_valid, .pipe_cmd, .pipe_cmd_ready,
      .pipe_rsp_valid, .pipe_rsp, .pipe_rsp_ready,
      .out_valid, .out, .out_ready, .reply_valid, .reply, .upc, .grant,
      .disp_wr_en, .disp_wr_addr, .disp_wr_data, .uc_wr_en, .uc_wr_addr, .uc_wr_data,
      .checks(c[u]), .failures(f[u]), .done(d[u]));
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (d.and());
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
