// tb_fetch_exec_ctrl: self-checking test of the fetch/execute sequencer.
// The decoded instruction, PC, effective address, Rt value and memory read
// data are driven with random values. In every cycle the test checks that
// the state alternates FETCH, EXEC from reset (two cycles per instruction)
// and that the outputs match what that state must do: in FETCH, address =
// PC, IR load, R7 <- PC+1; in EXEC, address = effective address, a store
// writes Rt's value to memory, a load writes the memory word to Rt, any
// other instruction writes nothing and raises other_valid.
module tb_fetch_exec_ctrl;
  import thumb16_pkg::*;
  logic        clk = 0, rst_n = 0;
  dec_t        dec;
  logic [15:0] pc, ea, rt_data, mem_rdata;
  state_e      state;
  logic        ir_load, mem_we, rf_we, instr_done, other_valid;
  logic [15:0] mem_addr, mem_wdata, rf_wd;
  logic [2:0]  rf_wa;
  int checks = 0, failures = 0;
  int n_kind [5];

  fetch_exec_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h (cycle state %0d)", what, got, exp, state);
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
    op_e ops [5] = '{OP_STR_REG, OP_LDR_REG, OP_STR_IMM, OP_LDR_IMM, OP_OTHER};
    int k;
    dec = '0; pc = 0; ea = 0; rt_data = 0; mem_rdata = 0;
    @(posedge clk);
    #1 rst_n = 1;     // released after an edge: the next cycle is a fetch
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      k = $urandom % 5;
      dec          = dec_t'($urandom);
      dec.op       = ops[k];
      dec.is_load  = (k == 1 || k == 3);
      dec.is_store = (k == 0 || k == 2);
      pc = 16'($urandom); ea = 16'($urandom);
      rt_data = 16'($urandom); mem_rdata = 16'($urandom);
      #1;
      // from reset, even cycles are fetches and odd cycles executes
      check(int'(state), (i % 2 == 0) ? int'(ST_FETCH) : int'(ST_EXEC), "state sequence");
      if (i % 2 == 0) begin
        check(int'(mem_addr), int'(pc), "fetch address");
        check(int'(ir_load), 1, "fetch loads IR");
        check(int'(mem_we), 0, "no write in fetch");
        check(int'(rf_we), 1, "fetch writes R7");
        check(int'(rf_wa), 7, "fetch target R7");
        check(int'(rf_wd), int'(16'(pc + 16'd1)), "PC+1");
        check(int'(instr_done), 0, "not done in fetch");
      end else begin
        n_kind[k]++;
        check(int'(mem_addr), int'(ea), "data address");
        check(int'(ir_load), 0, "IR holds in exec");
        check(int'(mem_we), int'(k == 0 || k == 2), "store strobe");
        if (k == 0 || k == 2) check(int'(mem_wdata), int'(rt_data), "store data = Rt");
        check(int'(rf_we), int'(k == 1 || k == 3), "load writes Rt");
        if (k == 1 || k == 3) begin
          check(int'(rf_wa), int'(dec.rt), "load target");
          check(int'(rf_wd), int'(mem_rdata), "load data");
        end
        check(int'(other_valid), int'(k == 4), "other_valid");
        check(int'(instr_done), 1, "done in exec");
      end
    end
    for (int j = 0; j < 5; j++)
      if (n_kind[j] == 0) begin
        failures++;
        $display("FAIL instruction kind %0d never executed", j);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
