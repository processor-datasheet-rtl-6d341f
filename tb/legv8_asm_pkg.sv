// legv8_asm_pkg: instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one LEGv8 instruction in
// the standard field layout: R (opcode[31:21] Rm[20:16] shamt[15:10] Rn[9:5]
// Rd[4:0]), I (opcode[31:22] imm12[21:10] Rn Rd), D (opcode[31:21]
// addr9[20:12] op[11:10] Rn Rt), IW (opcode[31:23] hw[22:21] imm16[20:5] Rd),
// CB (opcode[31:24] addr19[23:5] Rt) and B (opcode[31:26] addr26[25:0]).
// Branch offsets are in instructions, relative to the branch itself.
package legv8_asm_pkg;
  import legv8_pkg::*;

  function automatic logic [31:0] r_type(input logic [10:0] opc, input int rd, input int rn,
                                         input int rm, input int shamt = 0);
    return {opc, 5'(rm), 6'(shamt), 5'(rn), 5'(rd)};
  endfunction

  function automatic logic [31:0] i_type(input logic [9:0] opc, input int rd, input int rn,
                                         input int imm);
    return {opc, 12'(imm), 5'(rn), 5'(rd)};
  endfunction

  function automatic logic [31:0] d_type(input logic [10:0] opc, input int rt, input int rn,
                                         input int off);
    return {opc, 9'(off), 2'b00, 5'(rn), 5'(rt)};
  endfunction

  function automatic logic [31:0] iw_type(input logic [8:0] opc, input int rd, input int imm16,
                                          input int hw);
    return {opc, 2'(hw), 16'(imm16), 5'(rd)};
  endfunction

  function automatic logic [31:0] cb_type(input logic [7:0] opc, input int rt, input int off);
    return {opc, 19'(off), 5'(rt)};
  endfunction

  function automatic logic [31:0] b_type(input logic [5:0] opc, input int off);
    return {opc, 26'(off)};
  endfunction

endpackage
