// tb_addr_gen: self-checking test of addr_gen.
// First the two worked examples of the instruction set description:
// FF00h + Rm=0003h -> FF03h and FF00h + #4 -> FF04h, plus a wrap-around case.
// Then 2000 random base/offset pairs in both modes against a 17-bit sum
// truncated to 16 bits.
module tb_addr_gen;
  logic [15:0] base, roff, addr;
  logic [4:0]  imm5;
  logic        use_imm;
  int checks = 0, failures = 0;

  addr_gen #(.WIDTH(16)) dut (.base, .roff, .imm5, .use_imm, .addr);

  task automatic apply(input logic [15:0] b, r, input logic [4:0] im,
                       input logic ui, input logic [15:0] exp);
    base = b; roff = r; imm5 = im; use_imm = ui;
    #1;
    checks++;
    if (addr !== exp) begin
      failures++;
      $display("FAIL base=%h roff=%h imm=%0d use_imm=%b: got %h expected %h",
               b, r, im, ui, addr, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] wide;
    logic [15:0] b, r;
    logic [4:0]  im;
    apply(16'hFF00, 16'h0003, 5'd17, 1'b0, 16'hFF03);
    apply(16'hFF00, 16'h1234, 5'd4,  1'b1, 16'hFF04);
    apply(16'hFFFF, 16'h0000, 5'd31, 1'b1, 16'h001E);
    for (int i = 0; i < 2000; i++) begin
      b = 16'($urandom); r = 16'($urandom); im = 5'($urandom);
      wide = {1'b0, b} + {1'b0, r};
      apply(b, r, im, 1'b0, wide[15:0]);
      wide = {1'b0, b} + {12'd0, im};
      apply(b, r, im, 1'b1, wide[15:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
