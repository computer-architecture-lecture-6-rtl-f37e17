// ext_unit_tb: self-checking test of the immediate extender.
//
// Random and boundary immediates, sign- and zero-extended.
module ext_unit_tb;
  logic [15:0] imm;
  logic ext_op;
  logic [31:0] ext, exp;
  int checks = 0, failures = 0;

  ext_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      imm = (k < 4) ? 16'(32'h7fff + k) : 16'($urandom);
      ext_op = k[0];
      exp = 32'(imm);
      if (ext_op && imm >= 16'h8000) exp = exp + 32'hffff_0000;
      #1;
      checks++;
      if (ext !== exp) begin
        failures++;
        $display("FAIL imm=%h ext_op=%b got %h exp %h", imm, ext_op, ext, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
