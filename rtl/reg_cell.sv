// reg_cell: one register cell of the register array.
//
// A WIDTH-bit bank of D flip-flops with a load enable: on a rising clock edge
// with load high the cell captures d, otherwise it holds. q always shows the
// stored value, so a read sees a write one cycle after the edge that made it.
// The lecture asks for a 16-bit register cell; the asynchronous active-low
// reset and its value RESET_VAL are this design's choice (the register
// examples in the lecture start from 0000h, which is the default).
module reg_cell #(
  parameter int unsigned      WIDTH     = 16,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= RESET_VAL;
    else if (load) q <= d;
  end

endmodule
