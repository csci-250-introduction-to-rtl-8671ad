// tb_thumb16_cpu: end-to-end test of the CPU at its default size (16-bit
// words, 65536-word memory, reset PC 0000h).
//
// A reference instruction-set model in this testbench runs in lockstep with
// the CPU: whenever the CPU finishes an instruction (instr_done), the model
// executes the same one, and the test compares the instruction word, the
// memory write (strobe, address, data) and, after the clock edge, all eight
// registers. It also checks that instructions complete exactly two cycles
// apart.
//
// Phase 1 is a hand-written program that uses every mechanism: PC-relative
// loads (Rn = R7) to fetch constants, the two worked store examples of the
// instruction set (STR R0,[R2,R3] to FF03h and STR R0,[R2,#4] to FF04h with
// R2 = FF00h, R3 = 0003h, R0 = FF07h), register- and immediate-offset loads,
// an unimplemented store-half-word and a non-memory word that must be
// skipped, a load into R7 that jumps over trap code, a store of R7, and a
// final self-loop. Phase 2 resets the CPU and runs 20000 instructions of a
// random program filling the whole memory. Each mechanism is counted and one
// that never occurs counts as a failure.
module tb_thumb16_cpu;
  import thumb16_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] pc, ir, other_instr, other_op_a, other_op_b, mem_addr, mem_wdata;
  logic        instr_done, other_valid, mem_we;

  thumb16_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] m_mem [65536];
  logic [15:0] m_reg [8];
  int n_str_reg, n_ldr_reg, n_str_imm, n_ldr_imm, n_pcrel, n_jump, n_other, n_store_pc;
  longint cycle = 0, last_done = -1;
  int n_instr = 0;

  always @(posedge clk) cycle++;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0h expected %0h (instr %0d)", what, got, exp, n_instr);
    end
  endtask

  function automatic logic [15:0] enc_reg(input bit load, input int rm, rn, rt);
    return {4'b0101, load ? 3'b100 : 3'b000, 3'(rm), 3'(rn), 3'(rt)};
  endfunction
  function automatic logic [15:0] enc_imm(input bit load, input int imm, rn, rt);
    return {4'b0110, load, 5'(imm), 3'(rn), 3'(rt)};
  endfunction

  task automatic poke(input int a, input logic [15:0] v);
    m_mem[a] = v;
    dut.u_mem.mem[a] = v;
  endtask

  // One instruction of the reference model, checked against the CPU in its
  // execute cycle. Called at the falling edge in the middle of that cycle.
  task automatic step_model();
    logic [15:0] w, a, npc;
    logic [3:0]  opa;
    logic [2:0]  opb, rm, rn, rt;
    logic        st, ld, imm;
    w   = m_mem[m_reg[7]];
    npc = m_reg[7] + 16'd1;
    m_reg[7] = npc;
    opa = w[15:12]; opb = w[11:9];
    rm = w[8:6]; rn = w[5:3]; rt = w[2:0];
    st  = (opa == 4'b0101 && opb == 3'b000) || (opa == 4'b0110 && !w[11]);
    ld  = (opa == 4'b0101 && opb == 3'b100) || (opa == 4'b0110 &&  w[11]);
    imm = (opa == 4'b0110);
    a   = m_reg[rn] + (imm ? {11'd0, w[10:6]} : m_reg[rm]);
    check(int'(ir), int'(w), "instruction word");
    check(int'(pc), int'(npc), "PC during execute");
    check(int'(mem_we), int'(st), "store strobe");
    check(int'(other_valid), int'(!st && !ld), "other_valid");
    if (st || ld) check(int'(mem_addr), int'(a), "effective address");
    if (st) check(int'(mem_wdata), int'(m_reg[rt]), "store data");
    if (st && !imm) n_str_reg++;
    if (ld && !imm) n_ldr_reg++;
    if (st && imm)  n_str_imm++;
    if (ld && imm)  n_ldr_imm++;
    if (ld && rn == 3'd7) n_pcrel++;
    if (ld && rt == 3'd7) n_jump++;
    if (st && rt == 3'd7) n_store_pc++;
    if (!st && !ld) n_other++;
    if (st) m_mem[a] = m_reg[rt];
    if (ld) m_reg[rt] = m_mem[a];
  endtask

  task automatic run(input int count);
    for (int i = 0; i < count; i++) begin
      @(negedge clk iff instr_done);   // middle of the execute cycle
      if (last_done >= 0) check(int'(cycle - last_done), 2, "cycles per instruction");
      last_done = cycle;
      step_model();
      n_instr++;
      @(posedge clk);
      #1;
      for (int r = 0; r < 8; r++) check(int'(dut.u_regs.q[r]), int'(m_reg[r]), $sformatf("R%0d", r));
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    for (int r = 0; r < 8; r++) m_reg[r] = 16'h0000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_done = -1;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w;
    for (int a = 0; a < 65536; a++) poke(a, 16'h0000);

    // ---- phase 1: directed program ----
    poke(0,  enc_imm(1, 23, 7, 2));          // LDR R2,[R7,#23] -> mem[24] = FF00h
    poke(1,  enc_imm(1, 23, 7, 3));          // LDR R3,[R7,#23] -> mem[25] = 0003h
    poke(2,  enc_imm(1, 23, 7, 0));          // LDR R0,[R7,#23] -> mem[26] = FF07h
    poke(3,  16'b0101_000_011_010_000);      // STR R0,[R2,R3]  -> mem[FF03h]
    poke(4,  16'b0110_0_00100_010_000);      // STR R0,[R2,#4]  -> mem[FF04h]
    poke(5,  enc_reg(1, 3, 2, 1));           // LDR R1,[R2,R3]
    poke(6,  enc_imm(1, 5, 2, 4));           // LDR R4,[R2,#5]  -> 1234h
    poke(7,  16'b0101_001_011_010_100);      // store half-word: not executed
    poke(8,  16'h0000);                      // not a memory instruction
    poke(9,  enc_imm(1, 17, 7, 5));          // LDR R5,[R7,#17] -> mem[27] = 16
    poke(10, enc_imm(1, 16, 7, 7));          // LDR R7,[R7,#16] -> jump to 16
    for (int a = 11; a < 16; a++) poke(a, enc_imm(0, 10, 2, 0)); // trap: STR R0,[R2,#10]
    poke(16, enc_imm(0, 6, 2, 7));           // STR R7,[R2,#6]  -> mem[FF06h] = 17
    poke(17, enc_imm(1, 10, 7, 7));          // LDR R7,[R7,#10] -> mem[28] = 17: loop
    poke(24, 16'hFF00);
    poke(25, 16'h0003);
    poke(26, 16'hFF07);
    poke(27, 16'h0010);
    poke(28, 16'h0011);
    poke(16'hFF05, 16'h1234);
    poke(16'hFF0A, 16'hBEEF);
    do_reset();
    run(16);
    // the lecture's worked examples and the rest of the program's results
    check(int'(dut.u_mem.mem[16'hFF03]), 16'hFF07, "STR reg example result");
    check(int'(dut.u_mem.mem[16'hFF04]), 16'hFF07, "STR imm example result");
    check(int'(dut.u_mem.mem[16'hFF06]), 16'h0011, "stored PC");
    check(int'(dut.u_mem.mem[16'hFF0A]), 16'hBEEF, "trap code skipped");
    check(int'(dut.u_regs.q[1]), 16'hFF07, "R1");
    check(int'(dut.u_regs.q[4]), 16'h1234, "R4");
    check(int'(dut.u_regs.q[5]), 16'h0010, "R5");
    check(int'(pc), 16'h0011, "looping at 17");

    // ---- phase 2: random program over the whole memory ----
    for (int a = 0; a < 65536; a++) begin
      case ($urandom % 10)
        0, 1:    w = enc_reg($urandom % 2, $urandom % 8, $urandom % 8, $urandom % 8);
        2:       w = 16'($urandom);                                  // mostly not load/store
        3:       w = enc_imm(1, $urandom % 32, 7, $urandom % 8);     // PC-relative load
        default: w = enc_imm($urandom % 2, $urandom % 32, $urandom % 8, $urandom % 8);
      endcase
      poke(a, w);
    end
    do_reset();
    run(20000);

    if (n_str_reg == 0) begin failures++; $display("FAIL no STR register-offset"); end
    if (n_ldr_reg == 0) begin failures++; $display("FAIL no LDR register-offset"); end
    if (n_str_imm == 0) begin failures++; $display("FAIL no STR immediate"); end
    if (n_ldr_imm == 0) begin failures++; $display("FAIL no LDR immediate"); end
    if (n_pcrel == 0)   begin failures++; $display("FAIL no PC-relative load"); end
    if (n_jump == 0)    begin failures++; $display("FAIL no load into R7"); end
    if (n_store_pc == 0) begin failures++; $display("FAIL no store of R7"); end
    if (n_other == 0)   begin failures++; $display("FAIL no skipped instruction"); end
    $display("instructions %0d: STR reg %0d, LDR reg %0d, STR imm %0d, LDR imm %0d, PC-relative %0d, jumps %0d, PC stores %0d, skipped %0d",
             n_instr, n_str_reg, n_ldr_reg, n_str_imm, n_ldr_imm, n_pcrel, n_jump, n_store_pc, n_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
