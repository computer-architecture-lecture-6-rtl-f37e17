// mc_alu_control_tb: exhaustive test of the ALU control.
//
// All four ALUOp codes with all 64 function-field values; expected
// operations worked out from the ALUOp table and the MIPS function codes.
module mc_alu_control_tb;
  import mips_pkg::*;
  aluop_t alu_op;
  logic [5:0] funct;
  alu_fn_t fn, exp;
  int checks = 0, failures = 0;

  mc_alu_control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++) begin
      for (int f = 0; f < 64; f++) begin
        alu_op = aluop_t'(op); funct = 6'(f);
        case (op)
          0: exp = ALU_ADD;
          1: exp = ALU_SUB;
          3: exp = ALU_OR;
          default:
            case (f)
              32: exp = ALU_ADD;
              34: exp = ALU_SUB;
              36: exp = ALU_AND;
              37: exp = ALU_OR;
              42: exp = ALU_SLT;
              default: exp = ALU_ADD;
            endcase
        endcase
        #1;
        checks++;
        if (fn !== exp) begin
          failures++;
          $display("FAIL aluop=%0d funct=%0d got %0d exp %0d", op, f, fn, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
