// pa_asm_pkg: instruction encoders for P.Array test programs (16-bit format:
// [15:11] opcode, [10:7] A, [6:3] B, [2:0] off3 / [6:0] imm7 / [10:0] off11).
package pa_asm_pkg;
  import flexram_pkg::*;
  function automatic logic [15:0] R(pa_op_e op, int a, int b);
    return {op, 4'(a), 4'(b), 3'd0};
  endfunction
  function automatic logic [15:0] I(pa_op_e op, int a, int imm);
    return {op, 4'(a), 7'(imm)};
  endfunction
  function automatic logic [15:0] M(pa_op_e op, int a, int b, int off);
    return {op, 4'(a), 4'(b), 3'(off)};
  endfunction
  function automatic logic [15:0] J(pa_op_e op, int off);
    return {op, 11'(off)};
  endfunction
endpackage
