// regfile_tb: self-checking test of the 32 x 32-bit register file.
//
// Random writes and reads on all ports against a model; register 0 must
// stay zero; a write with we low must not change anything; reset clears.
module regfile_tb;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] ra1 = 0, ra2 = 0, wa = 0, dbg_addr = 0;
  logic [31:0] rd1, rd2, wd = 0, dbg_data;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      dbg_addr = 5'(i);
      #1 check(dbg_data, 32'd0, "cleared by reset");
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      wa = 5'($urandom); wd = $urandom;
      if (we && wa != 0) model[wa] = wd;
      @(negedge clk);
      we = 0;
      ra1 = 5'($urandom); ra2 = 5'($urandom); dbg_addr = (k % 8 == 0) ? 5'd0 : 5'($urandom);
      #1;
      check(rd1, model[ra1], "read port 1");
      check(rd2, model[ra2], "read port 2");
      check(dbg_data, model[dbg_addr], "debug port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
