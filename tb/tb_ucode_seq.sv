// tb_ucode_seq: checks the generic microcode sequencer.
//
// A 4-bit-opcode, 32-entry, 16-bit-wide sequencer is loaded through its write
// ports with a small program: address 0 dispatches; opcode k (1..15) starts a
// routine at address 2k-1 that is k mod 2 + 1 steps long, the last step
// jumping back through the dispatch memory. Microinstruction bits 15:8 carry
// the address, so the output can be checked against the micro-PC. A
// testbench model of the micro-PC (increment when bit 0 is 1, else the
// dispatch entry of the opcode) is compared with the DUT every cycle, with
// random opcodes and random stalls (en low must hold the micro-PC). A second,
// constant-table instance runs the same program and must match.
module tb_ucode_seq;
  localparam int unsigned OW = 4, PW = 5, UW = 16;

  // routine for opcode k: starts at 2k-1 (k >= 1) and is k % 2 + 1 steps long
  function automatic int unsigned start_of(int unsigned k);
    return (k == 0) ? 0 : 2 * k - 1;
  endfunction
  function automatic int unsigned len_of(int unsigned k);
    return k % 2 + 1;
  endfunction
  function automatic logic [UW-1:0] uword(int unsigned a);
    // bit 0: sequential; bits 15:8: own address
    logic seq;
    seq = 1'b0;
    for (int unsigned k = 1; k < 16; k++)
      if (a == start_of(k) && len_of(k) == 2) seq = 1'b1;
    return {8'(a), 7'h55, seq};
  endfunction
  function automatic logic [(2**OW)*PW-1:0] disp_tab();
    logic [(2**OW)*PW-1:0] t;
    for (int unsigned k = 0; k < 16; k++) t[k*PW +: PW] = PW'(start_of(k));
    return t;
  endfunction
  function automatic logic [(2**PW)*UW-1:0] uc_tab();
    logic [(2**PW)*UW-1:0] t;
    for (int unsigned a = 0; a < 32; a++) t[a*UW +: UW] = uword(a);
    return t;
  endfunction

  logic clk = 0, rst = 1, en = 0;
  logic [OW-1:0] opcode = 0;
  logic [PW-1:0] upc_p, upc_c;
  logic [UW-1:0] ui_p, ui_c;
  logic disp_wr_en = 0, uc_wr_en = 0;
  logic [OW-1:0] disp_wr_addr = 0;
  logic [PW-1:0] disp_wr_data = 0, uc_wr_addr = 0;
  logic [UW-1:0] uc_wr_data = 0;
  int checks = 0, failures = 0;
  int unsigned model_pc;
  int dispatches = 0, increments = 0, stalls = 0;

  always #5 clk = ~clk;

  ucode_seq #(.OPC_W(OW), .UPC_W(PW), .UW(UW), .PROGRAMMABLE(1)) dut_p (
    .clk, .rst, .en, .opcode, .upc(upc_p), .uinstr(ui_p),
    .disp_wr_en, .disp_wr_addr, .disp_wr_data, .uc_wr_en, .uc_wr_addr, .uc_wr_data);
  ucode_seq #(.OPC_W(OW), .UPC_W(PW), .UW(UW), .PROGRAMMABLE(0),
              .DISP_INIT(disp_tab()), .UCODE_INIT(uc_tab())) dut_c (
    .clk, .rst, .en, .opcode, .upc(upc_c), .uinstr(ui_c),
    .disp_wr_en(1'b0), .disp_wr_addr('0), .disp_wr_data('0),
    .uc_wr_en(1'b0), .uc_wr_addr('0), .uc_wr_data('0));

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
    repeat (2) @(negedge clk);
    rst = 0;
    // program through the write ports (en low: micro-PC stays 0)
    for (int unsigned k = 0; k < 16; k++) begin
      disp_wr_en = 1; disp_wr_addr = OW'(k); disp_wr_data = PW'(start_of(k));
      @(negedge clk);
    end
    disp_wr_en = 0;
    for (int unsigned a = 0; a < 32; a++) begin
      uc_wr_en = 1; uc_wr_addr = PW'(a); uc_wr_data = uword(a);
      @(negedge clk);
    end
    uc_wr_en = 0;
    check("pc held at 0 while en low", upc_p, 0);
    model_pc = 0;
    for (int n = 0; n < 3000; n++) begin
      opcode = OW'($urandom);
      en     = ($urandom % 4) != 0;
      #1;
      check("upc p", upc_p, model_pc);
      check("upc c", upc_c, model_pc);
      check("uinstr addr field", ui_p[15:8], model_pc);
      check("uinstr c", ui_c, ui_p);
      @(posedge clk);
      if (!en) stalls++;
      else if (uword(model_pc) & 1) begin
        model_pc = model_pc + 1; increments++;
      end else begin
        model_pc = start_of(opcode); dispatches++;
      end
      @(negedge clk);
    end
    check("saw dispatches", int'(dispatches > 100), 1);
    check("saw increments", int'(increments > 100), 1);
    check("saw stalls", int'(stalls > 100), 1);
    $display("dispatches=%0d increments=%0d stalls=%0d", dispatches, increments, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
