// mc_alu_tb: self-checking test of the main ALU.
//
// Random and corner operands for add, sub, and, or and signed slt, checked
// against results computed here; checks the Zero flag on every case.
module mc_alu_tb;
  import mips_pkg::*;
  alu_fn_t fn;
  logic [31:0] a, b, result, exp;
  logic zero;
  int checks = 0, failures = 0;

  mc_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int sel;
      sel = $urandom_range(0, 4);
      a = $urandom; b = (k % 7 == 0) ? a : $urandom;
      if (k % 11 == 0) a = 32'h8000_0000;
      if (k % 13 == 0) b = 32'h7fff_ffff;
      case (sel)
        0: begin fn = ALU_ADD; exp = a + b; end
        1: begin fn = ALU_SUB; exp = a - b; end
        2: begin fn = ALU_AND; exp = a & b; end
        3: begin fn = ALU_OR;  exp = a | b; end
        default: begin
          fn = ALU_SLT;
          // signed compare worked out from the sign bits
          if (a[31] != b[31]) exp = {31'd0, a[31]};
          else                exp = {31'd0, a[30:0] < b[30:0]};
        end
      endcase
      #1;
      checks++;
      if (result !== exp || zero !== (exp == 0)) begin
        failures++;
        $display("FAIL fn=%0d a=%h b=%h got %h/%b exp %h", fn, a, b, result, zero, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
