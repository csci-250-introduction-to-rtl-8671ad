// ls_decoder: instruction decoder for the single-data-item loads and stores.
//
// Combinational. It slices the 16-bit instruction into the fields of the two
// formats and classifies it with the opA/opB table of the lecture:
//   opA 0101, opB 000 -> STR Rt, [Rn, Rm]      opA 0101, opB 100 -> LDR Rt, [Rn, Rm]
//   opA 0110, opB 0xx -> STR Rt, [Rn, #imm5]   opA 0110, opB 1xx -> LDR Rt, [Rn, #imm5]
// Every other word (the half-word, byte and signed-byte forms, opB 001-011 and
// 101-111, the SP and byte/half-word groups opA 0111-1001, and all non-memory
// instructions) decodes as OP_OTHER, which the sequencer skips. The field
// positions are the lecture's; bundling them in a struct is this design's.
module ls_decoder
  import thumb16_pkg::*;
(
  input  logic [15:0] instr,
  output dec_t        dec
);

  always_comb begin
    dec.opa  = instr[15:12];
    dec.opb  = instr[11:9];
    dec.rm   = instr[8:6];
    dec.imm5 = instr[10:6];
    dec.rn   = instr[5:3];
    dec.rt   = instr[2:0];

    if (dec.opa == OPA_LS_REG && dec.opb == OPB_STR)      dec.op = OP_STR_REG;
    else if (dec.opa == OPA_LS_REG && dec.opb == OPB_LDR) dec.op = OP_LDR_REG;
    else if (dec.opa == OPA_LS_IMM && !instr[11])         dec.op = OP_STR_IMM;
    else if (dec.opa == OPA_LS_IMM &&  instr[11])         dec.op = OP_LDR_IMM;
    else                                                  dec.op = OP_OTHER;

    dec.use_imm  = (dec.op == OP_STR_IMM) || (dec.op == OP_LDR_IMM);
    dec.is_load  = (dec.op == OP_LDR_REG) || (dec.op == OP_LDR_IMM);
    dec.is_store = (dec.op == OP_STR_REG) || (dec.op == OP_STR_IMM);
  end

endmodule
