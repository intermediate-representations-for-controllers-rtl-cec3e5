// pctrl_harness: drives and checks one protocol-controller unit through its
// ports.
//
// Three requester drivers offer random requests and hold each one until it
// is accepted. Four data-pipe models accept commands with random ready; each
// read command returns one result, data = {pipe, read address} mixed by a
// fixed hash, after the command is taken. The units downstream take results
// with random ready.
//
// The checking model is written from the request semantics (see
// dispatch_harness for the command list of each operation): on every
// accepted request it appends the expected commands to a per-pipe list, the
// expected results of its reads to the same pipe's output list, and the
// expected reply to the reply list. Commands, results and replies seen at the
// ports must match these lists in order.
//
// The run has four phases. Between phases the harness stops requests, waits
// for the unit to drain and, with REPROGRAM set (the default), rewrites
// the Dispatch and microcode memories
// through the configuration ports (a mode switch): cached 8-word lines with
// single-word access (the reset contents), cached 16-word lines with
// double-word access, uncached, and cached 8-word single again. Counters
// report arbitration contention, Dispatch stalls, back-to-back dispatch,
// error replies, line transfers, full output queues and mode switches; a
// mechanism never seen counts as a failure.
module pctrl_harness
  import ctrl_pkg::*;
#(
  parameter int unsigned PHASE_CYCLES = 1500,
  parameter bit          REPROGRAM    = 1'b1,  // 0: keep the configuration below
  parameter int unsigned LW0          = 8,
  parameter bit          DBL0         = 1'b0,
  parameter bit          CACHED0      = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic [NUM_REQ-1:0]   req_valid,
  output pctrl_req_t           req [NUM_REQ],
  input  logic [NUM_REQ-1:0]   req_ready,
  input  logic [NUM_PIPES-1:0] pipe_cmd_valid,
  input  pipe_cmd_t            pipe_cmd [NUM_PIPES],
  output logic [NUM_PIPES-1:0] pipe_cmd_ready,
  output logic [NUM_PIPES-1:0] pipe_rsp_valid,
  output pipe_rsp_t            pipe_rsp [NUM_PIPES],
  input  logic [NUM_PIPES-1:0] pipe_rsp_ready,
  input  logic [NUM_PIPES-1:0] out_valid,
  input  pipe_rsp_t            out [NUM_PIPES],
  output logic [NUM_PIPES-1:0] out_ready,
  input  logic                 reply_valid,
  input  reply_t               reply,
  input  logic [UPC_W-1:0]     upc,
  input  logic [NUM_REQ-1:0]   grant,
  output logic                 disp_wr_en,
  output logic [OP_W-1:0]      disp_wr_addr,
  output logic [UPC_W-1:0]     disp_wr_data,
  output logic                 uc_wr_en,
  output logic [UPC_W-1:0]     uc_wr_addr,
  output logic [UW-1:0]        uc_wr_data,
  output int                   checks,
  output int                   failures,
  output bit                   done
);

  // current configuration of the unit
  int unsigned line_words = LW0;
  bit          dbl        = DBL0;
  bit          cached     = CACHED0;

  pipe_cmd_t exp_cmd   [NUM_PIPES][$];
  pipe_rsp_t exp_out   [NUM_PIPES][$];
  pipe_rsp_t pend_rsp  [NUM_PIPES][$];
  reply_t    exp_reply [$];

  int n_contend = 0, n_stall = 0, n_b2b = 0, n_err = 0, n_xfer = 0;
  int n_outfull = 0, n_switch = 0, n_dbl = 0, n_reads = 0, n_replies = 0;
  bit requests_on = 0;
  logic [UPC_W-1:0] prev_upc;
  bit prev_reply, prev_valid;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL pctrl %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [DATA_W-1:0] pipe_data(int p, logic [ADDR_W-1:0] a);
    return {a ^ 32'h9E37_79B9, 32'(p) * 32'h0101_0101 + a};
  endfunction

  function automatic pctrl_req_t random_req();
    pctrl_req_t r;
    r.op   = op_e'($urandom % 8);
    if (r.op == OP_NONE) r.op = OP_LINE_XFER;
    r.src  = PIPE_W'($urandom);
    r.dst  = PIPE_W'($urandom);
    r.addr = ADDR_W'($urandom) & ~ADDR_W'(15);
    r.tag  = TAG_W'($urandom);
    return r;
  endfunction

  // expected effects of one accepted request
  function automatic void expand(pctrl_req_t r);
    int unsigned step, b, n;
    reply_t rp;
    pipe_cmd_t c;
    step = dbl ? 2 : 1;
    b    = line_words / step;
    rp.tag = r.tag;
    rp.err = 0;
    case (r.op)
      OP_LINE_RD, OP_LINE_WR, OP_LINE_XFER: begin
        if (!cached) begin
          rp.err = 1;
        end else begin
          if (r.op == OP_LINE_XFER) n_xfer++;
          if (dbl) n_dbl++;
          n = (r.op == OP_LINE_XFER) ? b + 2 : b;
          for (int unsigned i = 0; i < n; i++) begin
            bit rd, wr;
            int unsigned wbeat;
            rd = (r.op == OP_LINE_RD) || (r.op == OP_LINE_XFER && i < b);
            wr = (r.op == OP_LINE_WR) || (r.op == OP_LINE_XFER && i >= 2);
            wbeat = (r.op == OP_LINE_XFER) ? i - 2 : i;
            if (rd && wr && r.src == r.dst) begin
              c = '0; c.rd = 1; c.wr = 1; c.dbl = dbl; c.tag = r.tag;
              c.rd_addr = r.addr + ADDR_W'(i * step);
              c.wr_addr = r.addr + ADDR_W'(wbeat * step);
              exp_cmd[r.src].push_back(c);
              exp_out[r.src].push_back('{data: pipe_data(r.src, c.rd_addr), tag: r.tag});
            end else begin
              if (rd) begin
                c = '0; c.rd = 1; c.dbl = dbl; c.tag = r.tag;
                c.rd_addr = r.addr + ADDR_W'(i * step);
                exp_cmd[r.src].push_back(c);
                exp_out[r.src].push_back('{data: pipe_data(r.src, c.rd_addr), tag: r.tag});
              end
              if (wr) begin
                c = '0; c.wr = 1; c.dbl = dbl; c.tag = r.tag;
                c.wr_addr = r.addr + ADDR_W'(wbeat * step);
                exp_cmd[r.dst].push_back(c);
              end
            end
          end
        end
      end
      OP_WORD_RD: begin
        c = '0; c.rd = 1; c.tag = r.tag; c.rd_addr = r.addr;
        exp_cmd[r.src].push_back(c);
        exp_out[r.src].push_back('{data: pipe_data(r.src, c.rd_addr), tag: r.tag});
      end
      OP_WORD_WR: begin
        c = '0; c.wr = 1; c.tag = r.tag; c.wr_addr = r.addr;
        exp_cmd[r.dst].push_back(c);
      end
      default: rp.err = 1;
    endcase
    exp_reply.push_back(rp);
  endfunction

  function automatic bit drained();
    bit d;
    d = (exp_reply.size() == 0);
    for (int p = 0; p < NUM_PIPES; p++)
      d &= (exp_cmd[p].size() == 0) && (exp_out[p].size() == 0) && (pend_rsp[p].size() == 0);
    return d;
  endfunction

  // Rewrite both microcode memories for a new configuration.
  task automatic reprogram(int unsigned lw, bit d, bit c);
    logic [DISP_BITS-1:0]  dt;
    logic [UCODE_BITS-1:0] ut;
    dt = build_dispatch(lw, d, c);
    ut = build_ucode(lw, d, c);
    for (int i = 0; i < 2 ** OP_W; i++) begin
      @(negedge clk);
      disp_wr_en = 1; disp_wr_addr = OP_W'(i); disp_wr_data = dt[i*UPC_W +: UPC_W];
    end
    for (int i = 0; i < 2 ** UPC_W; i++) begin
      @(negedge clk);
      disp_wr_en = 0;
      uc_wr_en = 1; uc_wr_addr = UPC_W'(i); uc_wr_data = ut[i*UW +: UW];
    end
    @(negedge clk);
    uc_wr_en = 0;
    line_words = lw; dbl = d; cached = c;
    n_switch++;
  endtask

  // ------------------------------------------------------------------
  // drivers: inputs change shortly after each rising edge
  // ------------------------------------------------------------------
  initial begin
    checks = 0; failures = 0; done = 0;
    req_valid = '0; pipe_cmd_ready = '0; pipe_rsp_valid = '0; out_ready = '0;
    disp_wr_en = 0; disp_wr_addr = '0; disp_wr_data = '0;
    uc_wr_en = 0; uc_wr_addr = '0; uc_wr_data = '0;
    for (int i = 0; i < NUM_REQ; i++) req[i] = '0;
    for (int p = 0; p < NUM_PIPES; p++) pipe_rsp[p] = '0;
    @(negedge rst);
    for (int phase = 0; phase < 4; phase++) begin
      if (REPROGRAM && phase == 1) reprogram(16, 1, 1);
      if (REPROGRAM && phase == 2) reprogram(8, 0, 0);
      if (REPROGRAM && phase == 3) reprogram(8, 0, 1);
      requests_on = 1;
      repeat (PHASE_CYCLES) @(posedge clk);
      requests_on = 0;
      // drain
      for (int w = 0; w < 2000 && !drained(); w++) @(posedge clk);
      repeat (5) @(posedge clk);
      check("drained after phase", drained(), 1);
    end
    check("mechanism: arbitration contention", n_contend > 0, 1);
    check("mechanism: dispatch stall", n_stall > 0, 1);
    check("mechanism: back-to-back dispatch", n_b2b > 0, 1);
    check("mechanism: error reply", n_err > 0, 1);
    if (REPROGRAM || CACHED0) check("mechanism: line transfer", n_xfer > 0, 1);
    if (REPROGRAM || (CACHED0 && DBL0)) check("mechanism: double-word lines", n_dbl > 0, 1);
    check("mechanism: output queue full", n_outfull > 0, 1);
    check("mechanism: mode switch", n_switch, REPROGRAM ? 3 : 0);
    $display("pctrl: replies=%0d reads=%0d contention=%0d stalls=%0d back-to-back=%0d errors=%0d transfers=%0d dbl-lines=%0d outq-full=%0d switches=%0d",
             n_replies, n_reads, n_contend, n_stall, n_b2b, n_err, n_xfer, n_dbl, n_outfull, n_switch);
    done = 1;
  end

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      for (int i = 0; i < NUM_REQ; i++) begin
        if (!(req_valid[i] && !req_ready[i])) begin
          // previous one accepted (or none): maybe offer a new one
          req_valid[i] = requests_on && (($urandom % 3) != 0);
          req[i]       = random_req();
        end
      end
      // long ready-low stretches make the queues fill up; word-only traffic
      // is light, so the pipes and downstream units are slower for it
      for (int p = 0; p < NUM_PIPES; p++) begin
        pipe_cmd_ready[p] = (($urandom % 8) < ((REPROGRAM || CACHED0) ? 5 : 1));
        out_ready[p]      = (($urandom % 8) < ((REPROGRAM || CACHED0) ? 4 : 1));
        pipe_rsp_valid[p] = (pend_rsp[p].size() != 0);
        if (pend_rsp[p].size() != 0) pipe_rsp[p] = pend_rsp[p][0];
      end
    end
  end

  // ------------------------------------------------------------------
  // monitors: sample just before each rising edge
  // ------------------------------------------------------------------
  always @(negedge clk) begin
    if (!rst && !done) begin
      if ($countones(req_valid) > 1) n_contend++;
      // stall: a routine step that neither moved on nor finished
      if (prev_valid && prev_upc != 0 && !prev_reply && upc == prev_upc) n_stall++;
      prev_valid = 1;
      prev_upc   = upc;
      prev_reply = reply_valid;
      for (int i = 0; i < NUM_REQ; i++)
        if (req_valid[i] && req_ready[i]) begin
          check("one grant", grant, 1 << i);
          if (reply_valid) n_b2b++;
          expand(req[i]);
        end
      if (reply_valid) begin
        n_replies++;
        if (reply.err) n_err++;
        if (exp_reply.size() == 0) check("unexpected reply", 1, 0);
        else begin
          reply_t e;
          e = exp_reply.pop_front();
          check("reply", reply, e);
        end
      end
      for (int p = 0; p < NUM_PIPES; p++) begin
        if (pipe_cmd_valid[p] && pipe_cmd_ready[p]) begin
          if (exp_cmd[p].size() == 0) check("unexpected pipe command", 1, 0);
          else begin
            pipe_cmd_t e;
            e = exp_cmd[p].pop_front();
            check("pipe command", pipe_cmd[p], e);
          end
          if (pipe_cmd[p].rd) begin
            n_reads++;
            pend_rsp[p].push_back('{data: pipe_data(p, pipe_cmd[p].rd_addr), tag: pipe_cmd[p].tag});
          end
        end
        if (pipe_rsp_valid[p] && pipe_rsp_ready[p]) void'(pend_rsp[p].pop_front());
        if (pipe_rsp_valid[p] && !pipe_rsp_ready[p]) n_outfull++;
        if (out_valid[p] && out_ready[p]) begin
          if (exp_out[p].size() == 0) check("unexpected result", 1, 0);
          else begin
            pipe_rsp_t e;
            e = exp_out[p].pop_front();
            check("result to other units", out[p], e);
          end
        end
      end
    end
  end

endmodule
