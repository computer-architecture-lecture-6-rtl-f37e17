// ext_unit: widens the 16-bit immediate field IR[15:0] to 32 bits.
//
// Combinational. With ExtOp = 1 the immediate is sign extended (arithmetic
// use: lw, sw, beq offsets); with ExtOp = 0 it is zero extended (logical
// use: ori). This is the "Sign extend" block of the datapath with the ExtOp
// control of the control tables.
module ext_unit (
  input  logic [15:0] imm,
  input  logic        ext_op,
  output logic [31:0] ext
);
  assign ext = {{16{ext_op & imm[15]}}, imm};
endmodule
