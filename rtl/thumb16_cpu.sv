// thumb16_cpu: a 16-bit von Neumann CPU that executes the single-data-item
// loads and stores of a Thumb-like instruction set.
//
// Datapath: the register array (R0..R6 general-purpose, R7 = programme
// counter) has three read ports addressed by the Rn, Rm and Rt fields of the
// instruction register. addr_gen adds Rn to Rm or to the 5-bit immediate. One
// main memory holds the instruction segment and the data segment, and its
// single port is used for the fetch in one cycle and the data access in the
// next (fetch_exec_ctrl). The instruction register is a reg_cell outside the
// register array, so it is not visible to programs.
//
// Instructions executed (two cycles each): STR/LDR Rt, [Rn, Rm] and
// STR/LDR Rt, [Rn, #imm5]. Using R7 as Rn gives a PC-relative load; loading
// R7 is a jump. Any other word is fetched, reported on other_valid /
// other_instr with the values of Rn (other_op_a) and Rm (other_op_b), and
// otherwise skipped: those ports are where an ALU would attach, and the
// lecture does not yet specify one.
//
// Reset (rst_n low, asynchronous): all registers 0000h, R7 = RESET_PC, the
// sequencer in FETCH. Memory contents are not reset; load the program into
// u_mem.mem before releasing reset. The widths and the instruction
// encodings follow the lecture; the reset address, the two-cycle sequence
// and the observation ports are this design's choices.
module thumb16_cpu
  import thumb16_pkg::*;
#(
  parameter logic [AW-1:0] RESET_PC = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [DW-1:0] pc,
  output logic [DW-1:0] ir,
  output logic          instr_done,
  output logic          other_valid,
  output logic [DW-1:0] other_instr,
  output logic [DW-1:0] other_op_a,
  output logic [DW-1:0] other_op_b,
  output logic [AW-1:0] mem_addr,
  output logic          mem_we,
  output logic [DW-1:0] mem_wdata
);

  dec_t          dec;
  state_e        state;
  logic          ir_load;
  logic [DW-1:0] mem_rdata;
  logic [DW-1:0] rn_data, rm_data, rt_data;
  logic          rf_we;
  logic [2:0]    rf_wa;
  logic [DW-1:0] rf_wd;
  logic [AW-1:0] ea;

  reg_cell #(.WIDTH(DW)) u_ir (
    .clk  (clk),
    .rst_n(rst_n),
    .load (ir_load),
    .d    (mem_rdata),
    .q    (ir)
  );

  ls_decoder u_dec (
    .instr(ir),
    .dec  (dec)
  );

  reg_array #(.WIDTH(DW), .RESET_PC(RESET_PC)) u_regs (
    .clk  (clk),
    .rst_n(rst_n),
    .ra_a (dec.rn),
    .rd_a (rn_data),
    .ra_b (dec.rm),
    .rd_b (rm_data),
    .ra_c (dec.rt),
    .rd_c (rt_data),
    .we   (rf_we),
    .wa   (rf_wa),
    .wd   (rf_wd),
    .pc   (pc)
  );

  addr_gen #(.WIDTH(AW)) u_agu (
    .base   (rn_data),
    .roff   (rm_data),
    .imm5   (dec.imm5),
    .use_imm(dec.use_imm),
    .addr   (ea)
  );

  fetch_exec_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .dec        (dec),
    .pc         (pc),
    .ea         (ea),
    .rt_data    (rt_data),
    .mem_rdata  (mem_rdata),
    .state      (state),
    .ir_load    (ir_load),
    .mem_addr   (mem_addr),
    .mem_we     (mem_we),
    .mem_wdata  (mem_wdata),
    .rf_we      (rf_we),
    .rf_wa      (rf_wa),
    .rf_wd      (rf_wd),
    .instr_done (instr_done),
    .other_valid(other_valid)
  );

  main_memory #(.DW(DW), .AW(AW)) u_mem (
    .clk  (clk),
    .addr (mem_addr),
    .we   (mem_we),
    .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  assign other_instr = ir;
  assign other_op_a  = rn_data;
  assign other_op_b  = rm_data;

endmodule
