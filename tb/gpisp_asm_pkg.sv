// gpisp_asm_pkg -- instruction encoders for the processor's testbenches.
// Each function returns one 16-bit instruction word:
//   A-type {op, rd, rs, rt}, I-type {op, rd, imm8}, J-type {op, rd, 8'h00}.
// For jr/jal the register holding the target is the rd field; for sw the
// rd field holds the data register; for rv the rs field is the special
// register number and for ov the rd field is.
package gpisp_asm_pkg;
  import gpisp_pkg::*;

  function automatic logic [15:0] a_type(opcode_e op, logic [3:0] rd, logic [3:0] rs, logic [3:0] rt);
    return {op, rd, rs, rt};
  endfunction

  function automatic logic [15:0] i_type(opcode_e op, logic [3:0] rd, logic [7:0] imm);
    return {op, rd, imm};
  endfunction

  function automatic logic [15:0] add_ (logic [3:0] d, logic [3:0] s, logic [3:0] t); return a_type(OP_ADD, d, s, t); endfunction
  function automatic logic [15:0] sub_ (logic [3:0] d, logic [3:0] s, logic [3:0] t); return a_type(OP_SUB, d, s, t); endfunction
  function automatic logic [15:0] and_ (logic [3:0] d, logic [3:0] s, logic [3:0] t); return a_type(OP_AND, d, s, t); endfunction
  function automatic logic [15:0] slt_ (logic [3:0] d, logic [3:0] s, logic [3:0] t); return a_type(OP_SLT, d, s, t); endfunction
  function automatic logic [15:0] lw_  (logic [3:0] d, logic [3:0] s, logic [3:0] t); return a_type(OP_LW,  d, s, t); endfunction
  function automatic logic [15:0] sw_  (logic [3:0] d, logic [3:0] s, logic [3:0] t); return a_type(OP_SW,  d, s, t); endfunction
  function automatic logic [15:0] beq_ (logic [3:0] d, logic [3:0] s, logic [3:0] t); return a_type(OP_BEQ, d, s, t); endfunction
  function automatic logic [15:0] bne_ (logic [3:0] d, logic [3:0] s, logic [3:0] t); return a_type(OP_BNE, d, s, t); endfunction
  function automatic logic [15:0] rv_  (logic [3:0] d, logic [3:0] sr);               return a_type(OP_RV,  d, sr, 4'd0); endfunction
  function automatic logic [15:0] ov_  (logic [3:0] sr, logic [3:0] s);               return a_type(OP_OV,  sr, s, 4'd0); endfunction
  function automatic logic [15:0] lui_ (logic [3:0] d, logic [7:0] imm);              return i_type(OP_LUI, d, imm); endfunction
  function automatic logic [15:0] lli_ (logic [3:0] d, logic [7:0] imm);              return i_type(OP_LLI, d, imm); endfunction
  function automatic logic [15:0] jr_  (logic [3:0] s);                               return a_type(OP_JR,  s, 4'd0, 4'd0); endfunction
  function automatic logic [15:0] jal_ (logic [3:0] s);                               return a_type(OP_JAL, s, 4'd0, 4'd0); endfunction
endpackage
