// mips_asm_pkg: instruction encoders for the test benches.
//
// Builds 32-bit MIPS instruction words from mnemonic fields, using the
// MIPS32 encodings written out here as literals so that the test benches
// do not depend on the constants of the design under test.
package mips_asm_pkg;

  function automatic logic [31:0] r_type(input logic [4:0] rd, rs, rt,
                                         input logic [5:0] funct);
    return {6'b000000, rs, rt, rd, 5'd0, funct};
  endfunction

  function automatic logic [31:0] add_(input logic [4:0] rd, rs, rt);
    return r_type(rd, rs, rt, 6'h20);
  endfunction
  function automatic logic [31:0] sub_(input logic [4:0] rd, rs, rt);
    return r_type(rd, rs, rt, 6'h22);
  endfunction
  function automatic logic [31:0] and_(input logic [4:0] rd, rs, rt);
    return r_type(rd, rs, rt, 6'h24);
  endfunction
  function automatic logic [31:0] or_(input logic [4:0] rd, rs, rt);
    return r_type(rd, rs, rt, 6'h25);
  endfunction
  function automatic logic [31:0] slt_(input logic [4:0] rd, rs, rt);
    return r_type(rd, rs, rt, 6'h2a);
  endfunction
  function automatic logic [31:0] ori_(input logic [4:0] rt, rs, input logic [15:0] imm);
    return {6'h0d, rs, rt, imm};
  endfunction
  function automatic logic [31:0] lw_(input logic [4:0] rt, rs, input logic [15:0] imm);
    return {6'h23, rs, rt, imm};
  endfunction
  function automatic logic [31:0] sw_(input logic [4:0] rt, rs, input logic [15:0] imm);
    return {6'h2b, rs, rt, imm};
  endfunction
  function automatic logic [31:0] beq_(input logic [4:0] rs, rt, input logic [15:0] off);
    return {6'h04, rs, rt, off};
  endfunction
  function automatic logic [31:0] j_(input logic [25:0] target);
    return {6'h02, target};
  endfunction
  // an opcode none of the machines implements (addi)
  function automatic logic [31:0] addi_(input logic [4:0] rt, rs, input logic [15:0] imm);
    return {6'h08, rs, rt, imm};
  endfunction

endpackage
