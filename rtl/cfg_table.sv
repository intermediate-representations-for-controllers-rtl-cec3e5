// cfg_table: table-based combinational logic.
//
// An arbitrary function of AW inputs and DW outputs is held as its truth
// table, DW bits wide and 2**AW entries deep, and read by using the inputs as
// the address. This is the building block of every table-driven controller in
// this library (next-state memory, output memory, dispatch memory, microcode
// memory).
//
// PROGRAMMABLE = 1 builds the flexible form: a writable configuration memory.
// Reset loads INIT into it; a write port (wr_en, wr_addr, wr_data, one entry
// per clock) changes entries afterwards. PROGRAMMABLE = 0 builds the
// specialised form: the table is the constant INIT, the write port is ignored,
// and synthesis can fold the table into plain logic by constant propagation.
// Both forms give the same read result for the same contents.
//
// Timing: the read is combinational (asynchronously readable memory); a write
// takes effect at the next rising clock edge. Reset is synchronous and only
// matters in the programmable form. The table-as-memory structure and its
// width/depth rule follow the described design; the reset load and the
// one-entry write port are this design's choices.
module cfg_table #(
  parameter int unsigned AW           = 7,
  parameter int unsigned DW           = 3,
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter logic [(2**AW)*DW-1:0] INIT = '0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data
);

  localparam int unsigned DEPTH = 2 ** AW;

  if (PROGRAMMABLE) begin : g_mem
    logic [DW-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= INIT[i*DW +: DW];
      end else if (wr_en) begin
        mem[wr_addr] <= wr_data;
      end
    end

    assign data = mem[addr];
  end else begin : g_const
    // The write port and clock have no function in the constant table.
    logic unused;
    assign unused = ^{clk, rst, wr_en, wr_addr, wr_data};
    assign data   = INIT[addr*DW +: DW];
  end

endmodule
