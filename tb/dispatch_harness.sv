// dispatch_harness: drives one pctrl_dispatch and checks it against a
// command-level model written from the request semantics alone.
//
// For each accepted request the model lists the steps the Dispatch block
// must issue: a line read of B = LINE_WORDS / (DBL ? 2 : 1) beats sends beat
// i to pipe src at addr + i * (DBL ? 2 : 1); a line write does the same to
// pipe dst; a line transfer runs B + 2 steps, reading beat i in step i and
// writing beat i - 2 in step i; a word read/write is one single-word step;
// opcodes the configuration lacks (line operations when uncached, codes
// 6 and 7) give one step with an error reply; OP_NONE is dropped. The last
// step carries the reply. Each cycle in which the DUT issues a command or a
// reply must match the next model step exactly. With every queue ready the
// reply must come B (or B + 2, or 1) cycles after the request was accepted,
// and no command may be offered to a queue that is not ready.
//
// Stimulus: the first PHASE1 cycles present a request every cycle with
// all queues ready (back-to-back dispatch, latency checks); afterwards
// requests and queue-ready are random (stalls). Counters report how often
// each mechanism was seen.
module dispatch_harness
  import ctrl_pkg::*;
#(
  parameter int unsigned LINE_WORDS   = 8,
  parameter bit          DBL          = 1'b0,
  parameter bit          CACHED       = 1'b1,
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter int unsigned CYCLES       = 3000,
  parameter int unsigned PHASE1       = 300
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_back2back,
  output int   n_err,
  output int   n_xfer,
  output bit   done
);

  typedef struct {
    logic [NUM_PIPES-1:0] valid;
    pipe_cmd_t            cmd [NUM_PIPES];
    bit                   last;
    bit                   err;
    logic [TAG_W-1:0]     tag;
  } step_t;

  localparam int unsigned STEP = DBL ? 2 : 1;
  localparam int unsigned B    = LINE_WORDS / STEP;

  logic                 req_valid;
  pctrl_req_t           req;
  logic                 req_ready;
  logic [NUM_PIPES-1:0] cmd_valid, cmd_ready;
  pipe_cmd_t            cmd [NUM_PIPES];
  logic                 reply_valid;
  reply_t               reply;
  logic [UPC_W-1:0]     upc;

  pctrl_dispatch #(.LINE_WORDS(LINE_WORDS), .DBL(DBL), .CACHED(CACHED),
                   .PROGRAMMABLE(PROGRAMMABLE)) dut (
    .clk, .rst, .req_valid, .req, .req_ready, .cmd_valid, .cmd, .cmd_ready,
    .reply_valid, .reply, .upc,
    .disp_wr_en(1'b0), .disp_wr_addr('0), .disp_wr_data('0),
    .uc_wr_en(1'b0), .uc_wr_addr('0), .uc_wr_data('0));

  step_t steps [$];
  int    accept_cycle [$];
  int    accept_stalls [$];
  int    accept_len [$];
  int    cycle = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL dispatch(L=%0d,D=%0d,C=%0d,P=%0d) %s: got %0h expected %0h at cycle %0d",
               LINE_WORDS, DBL, CACHED, PROGRAMMABLE, what, got, exp, cycle);
    end
  endtask

  function automatic step_t empty_step(logic [TAG_W-1:0] tag);
    step_t s;
    s.valid = '0;
    for (int p = 0; p < NUM_PIPES; p++) s.cmd[p] = '0;
    s.last = 0; s.err = 0; s.tag = tag;
    return s;
  endfunction

  // Append the model steps of one request; returns the number of steps.
  function automatic int expand(pctrl_req_t r);
    step_t s;
    int    n;
    bit    line_ok;
    line_ok = CACHED;
    n = 0;
    case (r.op)
      OP_NONE: return 0;
      OP_LINE_RD, OP_LINE_WR, OP_LINE_XFER: begin
        if (!line_ok) begin
          s = empty_step(r.tag); s.last = 1; s.err = 1; steps.push_back(s); return 1;
        end
        n = (r.op == OP_LINE_XFER) ? B + 2 : B;
        for (int i = 0; i < n; i++) begin
          s = empty_step(r.tag);
          if ((r.op == OP_LINE_RD) || (r.op == OP_LINE_XFER && i < B)) begin
            s.valid[r.src]       = 1;
            s.cmd[r.src].rd      = 1;
            s.cmd[r.src].rd_addr = r.addr + ADDR_W'(i * STEP);
          end
          if ((r.op == OP_LINE_WR) || (r.op == OP_LINE_XFER && i >= 2)) begin
            int beat;
            beat = (r.op == OP_LINE_XFER) ? i - 2 : i;
            s.valid[r.dst]       = 1;
            s.cmd[r.dst].wr      = 1;
            s.cmd[r.dst].wr_addr = r.addr + ADDR_W'(beat * STEP);
          end
          for (int p = 0; p < NUM_PIPES; p++) begin
            s.cmd[p].dbl = DBL;
            s.cmd[p].tag = r.tag;
          end
          s.last = (i == n - 1);
          steps.push_back(s);
        end
        return n;
      end
      OP_WORD_RD, OP_WORD_WR: begin
        s = empty_step(r.tag);
        if (r.op == OP_WORD_RD) begin
          s.valid[r.src] = 1; s.cmd[r.src].rd = 1; s.cmd[r.src].rd_addr = r.addr;
        end else begin
          s.valid[r.dst] = 1; s.cmd[r.dst].wr = 1; s.cmd[r.dst].wr_addr = r.addr;
        end
        for (int p = 0; p < NUM_PIPES; p++) s.cmd[p].tag = r.tag;
        s.last = 1;
        steps.push_back(s);
        return 1;
      end
      default: begin
        s = empty_step(r.tag); s.last = 1; s.err = 1; steps.push_back(s); return 1;
      end
    endcase
  endfunction

  function automatic pctrl_req_t random_req();
    pctrl_req_t r;
    r.op   = op_e'($urandom % 8);
    if (($urandom % 4) != 0 && r.op == OP_NONE) r.op = OP_LINE_XFER;
    r.src  = PIPE_W'($urandom);
    r.dst  = PIPE_W'($urandom);
    r.addr = ADDR_W'($urandom) & ~ADDR_W'(15);
    r.tag  = TAG_W'($urandom);
    return r;
  endfunction

  // Stimulus, changed right after each rising edge.
  initial begin
    checks = 0; failures = 0; n_stall = 0; n_back2back = 0; n_err = 0; n_xfer = 0;
    done = 0;
    req_valid = 0; req = '0; cmd_ready = '1;
    @(negedge rst);
    for (cycle = 0; cycle < CYCLES; cycle++) begin
      @(posedge clk);
      #1;
      if (!(req_valid && !req_ready)) begin   // keep an offered request stable
        req_valid = (cycle < PHASE1) ? 1'b1 : (($urandom % 3) == 0);
        req       = random_req();
      end
      cmd_ready = (cycle < PHASE1) ? '1 : NUM_PIPES'($urandom | $urandom);
    end
    req_valid = 0; cmd_ready = '1;
    repeat (40) @(posedge clk);
    check("all model steps issued", steps.size(), 0);
    done = 1;
  end

  // Checker, sampling just before each rising edge.
  always @(negedge clk) begin
    if (!rst && !done) begin
      bit acted;
      acted = (cmd_valid != 0) || reply_valid;
      // a command may only be offered to a queue that can take it
      for (int p = 0; p < NUM_PIPES; p++)
        if (cmd_valid[p]) check("command only to a ready queue", cmd_ready[p], 1);
      if (acted) begin
        if (steps.size() == 0) begin
          check("unexpected step", 1, 0);
        end else begin
          step_t s;
          s = steps.pop_front();
          check("cmd_valid", cmd_valid, s.valid);
          for (int p = 0; p < NUM_PIPES; p++)
            if (s.valid[p]) begin
              check("cmd.rd", cmd[p].rd, s.cmd[p].rd);
              check("cmd.wr", cmd[p].wr, s.cmd[p].wr);
              check("cmd.dbl", cmd[p].dbl, s.cmd[p].dbl);
              check("cmd.tag", cmd[p].tag, s.cmd[p].tag);
              if (s.cmd[p].rd) check("cmd.rd_addr", cmd[p].rd_addr, s.cmd[p].rd_addr);
              if (s.cmd[p].wr) check("cmd.wr_addr", cmd[p].wr_addr, s.cmd[p].wr_addr);
            end
          check("reply_valid", reply_valid, s.last);
          if (s.last) begin
            check("reply.tag", reply.tag, s.tag);
            check("reply.err", reply.err, s.err);
            if (s.err) n_err++;
            // latency: reply n cycles after the accept when nothing stalled
            if (accept_cycle.size() != 0) begin
              int ac, as, al;
              ac = accept_cycle.pop_front();
              as = accept_stalls.pop_front();
              al = accept_len.pop_front();
              if (as == n_stall) check("reply latency", cycle - ac, al);
            end
          end
        end
      end else if (steps.size() != 0 && cmd_ready != '1) begin
        n_stall++;
      end
      if (req_valid && req_ready) begin
        int n;
        if (reply_valid) n_back2back++;
        if (req.op == OP_LINE_XFER && CACHED) n_xfer++;
        n = expand(req);
        if (n != 0) begin
          accept_cycle.push_back(cycle);
          accept_stalls.push_back(n_stall);
          accept_len.push_back(n);
        end
      end
    end
  end

endmodule
