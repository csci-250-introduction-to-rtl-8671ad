// fetch_exec_ctrl: two-state sequencer of the load/store CPU.
//
// Every instruction takes two clock cycles, because fetch and data access
// share the one memory port:
//   FETCH: memory address = PC (R7); the instruction register loads the word
//          read, and R7 is written with PC+1 through the register array's
//          write port. R7 therefore holds the address of the next
//          instruction while the current one executes, as the lecture
//          describes for ARM.
//   EXEC : memory address = the effective address from addr_gen. A store
//          writes Rt's value there; a load writes the word read into Rt (a
//          load into R7 is a jump). Any other instruction does nothing and
//          raises other_valid. instr_done pulses in this cycle.
// The state machine, its two-cycle timing and the reset into FETCH are this
// design's choices; the lecture gives only what each instruction does.
module fetch_exec_ctrl
  import thumb16_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  dec_t          dec,        // decoded instruction register
  input  logic [DW-1:0] pc,         // R7
  input  logic [AW-1:0] ea,         // effective address from addr_gen
  input  logic [DW-1:0] rt_data,    // value of Rt, for stores
  input  logic [DW-1:0] mem_rdata,
  output state_e        state,
  output logic          ir_load,
  output logic [AW-1:0] mem_addr,
  output logic          mem_we,
  output logic [DW-1:0] mem_wdata,
  output logic          rf_we,
  output logic [2:0]    rf_wa,
  output logic [DW-1:0] rf_wd,
  output logic          instr_done,
  output logic          other_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_FETCH;
    else        state <= (state == ST_FETCH) ? ST_EXEC : ST_FETCH;
  end

  always_comb begin
    ir_load     = 1'b0;
    mem_addr    = ea;
    mem_we      = 1'b0;
    mem_wdata   = rt_data;
    rf_we       = 1'b0;
    rf_wa       = dec.rt;
    rf_wd       = mem_rdata;
    instr_done  = 1'b0;
    other_valid = 1'b0;
    if (state == ST_FETCH) begin
      mem_addr = pc;
      ir_load  = 1'b1;
      rf_we    = 1'b1;
      rf_wa    = PC_REG;
      rf_wd    = pc + 1'b1;
    end else begin
      mem_we      = dec.is_store;
      rf_we       = dec.is_load;
      instr_done  = 1'b1;
      other_valid = (dec.op == OP_OTHER);
    end
  end

  // Memory is written only while executing a store, and never in the cycle a
  // register is loaded from memory.
  a_store_only_in_exec: assert property (@(posedge clk) disable iff (!rst_n)
    mem_we |-> (state == ST_EXEC && dec.is_store && !rf_we));
  // The fetch always advances R7 by one.
  a_fetch_writes_pc: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_FETCH) |-> (rf_we && rf_wa == PC_REG && rf_wd == pc + 1'b1));

endmodule
