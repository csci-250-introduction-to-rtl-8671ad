// main_memory: unified word-addressed main memory of the von Neumann CPU.
//
// 2^AW words of DW bits; one word per address, no byte addressing. The same
// single port serves instruction fetch and data access, so the instruction
// segment and the data segment are just two regions of this array. Reads are
// combinational (rdata shows mem[addr] in the same cycle); a write happens on
// the rising clock edge with we high and is visible from the next cycle.
// Word size and 16-bit addresses follow the lecture; the asynchronous read and
// the single port are this design's choices. The contents are not reset.
module main_memory #(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
