// src_alu_tb: self-checking test of the bus machines' ALU (ADD, INC4,
// PASS_B) with random operands.
module src_alu_tb;
  import mips_pkg::*;
  src_alu_fn_t fn;
  logic [31:0] a, b, c, exp;
  int checks = 0, failures = 0;

  src_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 900; k++) begin
      a = $urandom; b = (k % 50 == 0) ? 32'hffff_fffe : $urandom;
      case (k % 3)
        0: begin fn = SALU_ADD;   exp = a + b; end
        1: begin fn = SALU_INC4;  exp = b + 4; end
        default: begin fn = SALU_PASSB; exp = b; end
      endcase
      #1;
      checks++;
      if (c !== exp) begin
        failures++;
        $display("FAIL fn=%0d a=%h b=%h got %h exp %h", fn, a, b, c, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
