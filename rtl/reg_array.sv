// reg_array: the CPU's eight user-visible 16-bit registers, R0..R7.
//
// R0..R6 are general-purpose and R7 is the programme counter, as in the
// lecture's 16-bit Thumb CPU. Each register is a reg_cell; each of the three
// read ports is an 8-to-1 multiplexer over the eight cell outputs, so reads
// are combinational. There is one write port: on a rising edge with we high,
// register wa takes wd. R7 has no special path of its own: the sequencer
// writes PC+1 into it through the same write port, and a load into R7 is a
// jump. The dedicated pc output is R7 for the instruction fetch.
//
// Three read ports (enough for STR Rt, [Rn, Rm] in one cycle), a single write
// port and the reset of every register to 0000h (R7 to RESET_PC) are this
// design's choices; the lecture leaves the register array's ports open.
module reg_array #(
  parameter int unsigned      WIDTH    = 16,
  parameter logic [WIDTH-1:0] RESET_PC = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       ra_a,
  output logic [WIDTH-1:0] rd_a,
  input  logic [2:0]       ra_b,
  output logic [WIDTH-1:0] rd_b,
  input  logic [2:0]       ra_c,
  output logic [WIDTH-1:0] rd_c,
  input  logic             we,
  input  logic [2:0]       wa,
  input  logic [WIDTH-1:0] wd,
  output logic [WIDTH-1:0] pc
);

  logic [7:0][WIDTH-1:0] q;
  logic [7:0]            load;

  // write-address decoder: one load enable per cell
  always_comb begin
    load = '0;
    if (we) load[wa] = 1'b1;
  end

  for (genvar i = 0; i < 8; i++) begin : g_cell
    reg_cell #(
      .WIDTH    (WIDTH),
      .RESET_VAL((i == 7) ? RESET_PC : WIDTH'(0))
    ) u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load[i]),
      .d    (wd),
      .q    (q[i])
    );
  end

  mux8to1 #(.WIDTH(WIDTH)) u_mux_a (.d(q), .sel(ra_a), .y(rd_a));
  mux8to1 #(.WIDTH(WIDTH)) u_mux_b (.d(q), .sel(ra_b), .y(rd_b));
  mux8to1 #(.WIDTH(WIDTH)) u_mux_c (.d(q), .sel(ra_c), .y(rd_c));

  assign pc = q[7];

endmodule
