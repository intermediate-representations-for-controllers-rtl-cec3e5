// ucode_seq: a generic microcode sequencer.
//
// The micro-PC register (UPC_W bits, 2**UPC_W microinstructions) addresses the
// microcode memory, whose UW-bit word is the controller output. One bit of
// that word, SEQ_BIT, drives the next-address mux: 1 selects micro-PC + 1
// (the usual sequential step), 0 selects the Dispatch memory output, which is
// addressed by the OPC_W-bit opcode input and holds the start address of the
// routine for each opcode. Any jump is therefore a dispatch.
//
// Both memories are cfg_tables: programmable through their write ports, or
// constants (PROGRAMMABLE = 0) that synthesis can fold into fixed logic.
//
// Timing: uinstr is combinational from the micro-PC; the micro-PC advances at
// the rising clock edge when en is high and holds when en is low (a stall).
// Synchronous reset sets the micro-PC to 0. The memories, the +1 path and the
// two-way mux follow the described sequencer; the stall input, the reset value
// and the default sizes are this design's choices.
module ucode_seq #(
  parameter int unsigned OPC_W        = 4,
  parameter int unsigned UPC_W        = 5,
  parameter int unsigned UW           = 16,
  parameter int unsigned SEQ_BIT      = 0,
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter logic [(2**OPC_W)*UPC_W-1:0] DISP_INIT  = '0,
  parameter logic [(2**UPC_W)*UW-1:0]    UCODE_INIT = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [OPC_W-1:0] opcode,
  output logic [UPC_W-1:0] upc,
  output logic [UW-1:0]    uinstr,
  // dispatch memory write port
  input  logic             disp_wr_en,
  input  logic [OPC_W-1:0] disp_wr_addr,
  input  logic [UPC_W-1:0] disp_wr_data,
  // microcode memory write port
  input  logic             uc_wr_en,
  input  logic [UPC_W-1:0] uc_wr_addr,
  input  logic [UW-1:0]    uc_wr_data
);

  logic [UPC_W-1:0] disp_target;
  logic [UPC_W-1:0] upc_next;

  cfg_table #(.AW(OPC_W), .DW(UPC_W), .PROGRAMMABLE(PROGRAMMABLE), .INIT(DISP_INIT)) u_disp_mem (
    .clk, .rst,
    .addr    (opcode),
    .data    (disp_target),
    .wr_en   (disp_wr_en),
    .wr_addr (disp_wr_addr),
    .wr_data (disp_wr_data)
  );

  cfg_table #(.AW(UPC_W), .DW(UW), .PROGRAMMABLE(PROGRAMMABLE), .INIT(UCODE_INIT)) u_ucode_mem (
    .clk, .rst,
    .addr    (upc),
    .data    (uinstr),
    .wr_en   (uc_wr_en),
    .wr_addr (uc_wr_addr),
    .wr_data (uc_wr_data)
  );

  // Next-address mux: input 0 is the dispatch target, input 1 is micro-PC + 1.
  always_comb begin
    if (uinstr[SEQ_BIT]) upc_next = upc + 1'b1;
    else                 upc_next = disp_target;
  end

  always_ff @(posedge clk) begin
    if (rst)     upc <= '0;
    else if (en) upc <= upc_next;
  end

endmodule
