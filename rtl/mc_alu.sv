// mc_alu: the ALU of the mux-based multi-cycle datapath.
//
// Purely combinational. fn selects add, subtract, bitwise and, bitwise or
// or set-on-less-than (signed); zero is high when the result is all zeros,
// which the branch uses to compare A and B by subtraction. The same ALU also
// computes PC+4 and the branch target, so no separate adders are needed.
// The operation set is the one the R-type instructions of the design need;
// its encoding (alu_fn_t) is this design's own.
module mc_alu
  import mips_pkg::*;
(
  input  alu_fn_t     fn,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output logic        zero
);
  always_comb begin
    unique case (fn)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_SLT: result = {31'd0, $signed(a) < $signed(b)};
      default: result = a + b;
    endcase
  end

  assign zero = (result == '0);

endmodule
