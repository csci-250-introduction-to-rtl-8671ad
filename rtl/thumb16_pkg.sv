// thumb16_pkg: types and constants shared by the 16-bit load/store CPU.
//
// The instruction formats follow the lecture's bit tables:
//   register offset : [15:12] opA=0101, [11:9] opB, [8:6] Rm, [5:3] Rn, [2:0] Rt
//   immediate offset: [15:12] opA=0110, [11]   opB, [10:6] imm5, [5:3] Rn, [2:0] Rt
// opB 000 is STR and 100 is LDR (register form); opB 0 is STR and 1 is LDR
// (immediate form). The enum below and the decoded-instruction struct are
// this design's own way of carrying those fields between blocks.
package thumb16_pkg;

  localparam int unsigned DW    = 16;  // data word and register width
  localparam int unsigned AW    = 16;  // word address width
  localparam logic [2:0]  PC_REG = 3'd7;  // R7 holds the programme counter

  localparam logic [3:0] OPA_LS_REG = 4'b0101;
  localparam logic [3:0] OPA_LS_IMM = 4'b0110;
  localparam logic [2:0] OPB_STR    = 3'b000;
  localparam logic [2:0] OPB_LDR    = 3'b100;

  typedef enum logic [2:0] {
    OP_STR_REG = 3'd0,   // STR Rt, [Rn, Rm]
    OP_LDR_REG = 3'd1,   // LDR Rt, [Rn, Rm]
    OP_STR_IMM = 3'd2,   // STR Rt, [Rn, #imm5]
    OP_LDR_IMM = 3'd3,   // LDR Rt, [Rn, #imm5]
    OP_OTHER   = 3'd4    // anything this CPU does not execute
  } op_e;

  typedef struct packed {
    op_e        op;
    logic [3:0] opa;
    logic [2:0] opb;
    logic [2:0] rm;
    logic [2:0] rn;
    logic [2:0] rt;
    logic [4:0] imm5;
    logic       use_imm;   // offset is imm5 rather than Rm
    logic       is_load;
    logic       is_store;
  } dec_t;

  typedef enum logic {
    ST_FETCH = 1'b0,
    ST_EXEC  = 1'b1
  } state_e;

endpackage
