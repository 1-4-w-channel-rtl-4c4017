// risc_pkg: instruction set of the small RISC of the classification and
// decision stage.  The processor description calls for a programmable RISC
// with program counter, instruction SRAM and data SRAM but does not define
// an instruction set; the 16-bit format below is this design's own.
//
//   [15:12] opcode  [11:9] rd  [8:6] rs  [5:3] rt   (register forms)
//   [5:0]  imm6, signed   [8:0] imm9, signed   [11:0] imm12, unsigned
//   r0 always reads zero.
package risc_pkg;
  typedef enum logic [3:0] {
    OP_ADD  = 4'h0,  // rd = rs + rt
    OP_SUB  = 4'h1,  // rd = rs - rt
    OP_MUL  = 4'h2,  // rd = low 16 bits of rs * rt
    OP_ADDI = 4'h3,  // rd = rs + imm6
    OP_LW   = 4'h4,  // rd = dmem[rs + imm6]
    OP_SW   = 4'h5,  // dmem[rs + imm6] = rd
    OP_BEQ  = 4'h6,  // if rd == rs: pc = pc + 1 + imm6
    OP_BLT  = 4'h7,  // if rd <  rs (signed): pc = pc + 1 + imm6
    OP_LI   = 4'h8,  // rd = imm9
    OP_JMP  = 4'h9,  // pc = imm12
    OP_OUT  = 4'hA,  // chip output = rd
    OP_HALT = 4'hB,  // stop until the next feature-extraction iteration
    OP_SRA  = 4'hC,  // rd = rs >>> imm6[3:0]
    OP_AND  = 4'hD,  // rd = rs & rt
    OP_OR   = 4'hE,  // rd = rs | rt
    OP_NOP  = 4'hF
  } opcode_e;

  function automatic logic [15:0] enc_r(opcode_e op, int rd, int rs, int rt);
    return {op, 3'(rd), 3'(rs), 3'(rt), 3'b000};
  endfunction
  function automatic logic [15:0] enc_i(opcode_e op, int rd, int rs, int imm);
    return {op, 3'(rd), 3'(rs), 6'(imm)};
  endfunction
  function automatic logic [15:0] enc_li(int rd, int imm);
    return {OP_LI, 3'(rd), 9'(imm)};
  endfunction
  function automatic logic [15:0] enc_j(int target);
    return {OP_JMP, 12'(target)};
  endfunction
endpackage
