// tb_ls_decoder: self-checking test of ls_decoder.
// Decodes the two example words of the instruction set description
// (0101 000 011 010 000 = STR R0, [R2, R3] and 0110 0 00100 010 000 =
// STR R0, [R2, #4]), then every one of the 65536 instruction words. The
// reference class comes from wildcard patterns over the whole word, and the
// fields from fixed bit positions.
module tb_ls_decoder;
  import thumb16_pkg::*;
  logic [15:0] instr;
  dec_t        dec;
  int checks = 0, failures = 0;
  int n_op [5];

  ls_decoder dut (.instr, .dec);

  function automatic op_e ref_op(input logic [15:0] w);
    casez (w)
      16'b0101_000_???_???_???: return OP_STR_REG;
      16'b0101_100_???_???_???: return OP_LDR_REG;
      16'b0110_0??_???_???_???: return OP_STR_IMM;
      16'b0110_1??_???_???_???: return OP_LDR_IMM;
      default:                  return OP_OTHER;
    endcase
  endfunction

  task automatic expect_eq(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s instr=%h: got %0d expected %0d", what, instr, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_e r;
    instr = 16'b0101_000_011_010_000; #1;
    expect_eq(int'(dec.op), int'(OP_STR_REG), "example STR reg op");
    expect_eq(int'(dec.rm), 3, "example rm");
    expect_eq(int'(dec.rn), 2, "example rn");
    expect_eq(int'(dec.rt), 0, "example rt");
    instr = 16'b0110_0_00100_010_000; #1;
    expect_eq(int'(dec.op), int'(OP_STR_IMM), "example STR imm op");
    expect_eq(int'(dec.imm5), 4, "example imm5");
    expect_eq(int'(dec.rn), 2, "example rn");
    expect_eq(int'(dec.rt), 0, "example rt");
    for (int w = 0; w < 65536; w++) begin
      instr = 16'(w);
      #1;
      r = ref_op(instr);
      n_op[int'(r)]++;
      expect_eq(int'(dec.op), int'(r), "op");
      expect_eq(int'(dec.rt), w & 7, "rt");
      expect_eq(int'(dec.rn), (w >> 3) & 7, "rn");
      expect_eq(int'(dec.rm), (w >> 6) & 7, "rm");
      expect_eq(int'(dec.imm5), (w >> 6) & 31, "imm5");
      expect_eq(int'(dec.use_imm), int'(r == OP_STR_IMM || r == OP_LDR_IMM), "use_imm");
      expect_eq(int'(dec.is_load), int'(r == OP_LDR_REG || r == OP_LDR_IMM), "is_load");
      expect_eq(int'(dec.is_store), int'(r == OP_STR_REG || r == OP_STR_IMM), "is_store");
    end
    // 512 words per register-form opcode, 2048 per immediate-form opcode
    expect_eq(n_op[0], 512, "count STR reg");
    expect_eq(n_op[1], 512, "count LDR reg");
    expect_eq(n_op[2], 2048, "count STR imm");
    expect_eq(n_op[3], 2048, "count LDR imm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
