// addr_gen: effective-address adder for loads and stores.
//
// addr = base + offset, where base is the value of Rn and the offset is
// either the value of Rm (register form) or the 5-bit immediate zero-extended
// (immediate form). The sum wraps modulo 2^WIDTH. Memory is addressed in
// 16-bit words, so the immediate is not scaled: the lecture's examples give
// FF00h + 0003h = FF03h and FF00h + #4 = FF04h. Combinational.
module addr_gen #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] base,
  input  logic [WIDTH-1:0] roff,
  input  logic [4:0]       imm5,
  input  logic             use_imm,
  output logic [WIDTH-1:0] addr
);

  logic [WIDTH-1:0] offset;

  always_comb begin
    offset = use_imm ? WIDTH'(imm5) : roff;
    addr   = base + offset;
  end

endmodule
