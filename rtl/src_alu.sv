// src_alu: ALU of the bus-based multi-cycle machines.
//
// Combinational, inputs A and B, output C. Three operations are enough for
// instruction fetch and the add instruction of these machines:
//   SALU_ADD   C = A + B   (the add instruction)
//   SALU_INC4  C = B + 4   (PC + 4 during fetch, the PC arrives on a bus
//                           that feeds input B)
//   SALU_PASSB C = B       (plain register-to-register transfers through
//                           the ALU)
// The three operations are the document's; their encoding is this
// design's.
module src_alu
  import mips_pkg::*;
(
  input  src_alu_fn_t fn,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] c
);
  always_comb begin
    unique case (fn)
      SALU_ADD:   c = a + b;
      SALU_INC4:  c = b + 32'd4;
      SALU_PASSB: c = b;
      default:    c = b;
    endcase
  end
endmodule
