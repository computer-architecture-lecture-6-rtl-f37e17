// mc_alu_control: chooses the ALU operation.
//
// Combinational. ALUOp 00 asks for an add (PC+4, address calculation),
// 01 for a subtract (branch compare) and 10 lets the instruction's function
// field pick the operation (R-type). 11 asks for an or, which ORI needs: the
// control tables name "or" as ORI's ALU operation but give it no code, so
// 11 is this design's choice. An unknown function field falls back to add.
module mc_alu_control
  import mips_pkg::*;
(
  input  aluop_t      alu_op,
  input  logic [5:0]  funct,
  output alu_fn_t     fn
);
  always_comb begin
    unique case (alu_op)
      ALUOP_ADD: fn = ALU_ADD;
      ALUOP_SUB: fn = ALU_SUB;
      ALUOP_OR:  fn = ALU_OR;
      ALUOP_FUNC: begin
        unique case (funct)
          FN_ADD:  fn = ALU_ADD;
          FN_SUB:  fn = ALU_SUB;
          FN_AND:  fn = ALU_AND;
          FN_OR:   fn = ALU_OR;
          FN_SLT:  fn = ALU_SLT;
          default: fn = ALU_ADD;
        endcase
      end
      default: fn = ALU_ADD;
    endcase
  end

endmodule
