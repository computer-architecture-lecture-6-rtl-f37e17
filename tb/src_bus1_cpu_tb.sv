// src_bus1_cpu_tb: self-checking program run on the single-bus machine.
//
// Registers r1 and r2 are preset (the machine has no instruction that
// loads a value, so the bench writes them into the register file through
// a hierarchical reference right after reset), then a program of add
// instructions and one unknown instruction (addi) runs. The bench checks,
// for every instruction, its address and its length in cycles: 6 cycles
// for add and 3 for an instruction the machine does not execute. At the
// end every register is compared with hand-worked values; r0 must stay 0.
module src_bus1_cpu_tb;
  import mips_asm_pkg::*;

  logic clk = 0, rst = 1;
  logic [31:0] mem_addr, mem_rdata, pc, ir, dbg_reg_data, host_rdata;
  logic [31:0] host_addr = 0, host_wdata = 0;
  logic mem_read, instr_done, host_we = 0;
  logic [4:0] dbg_reg = 0;
  logic [2:0] step;
  int checks = 0, failures = 0;

  src_bus1_cpu dut (.*);

  memory #(.WORDS(64)) u_mem (
    .clk (clk), .addr (mem_addr), .wdata (32'd0), .mem_read (mem_read),
    .mem_write (1'b0), .rdata (mem_rdata), .host_we (host_we),
    .host_addr (host_addr), .host_wdata (host_wdata), .host_rdata (host_rdata)
  );

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] prog [$] = '{
    add_(5'd3, 5'd1, 5'd2),          // 00 r3 = r1 + r2
    add_(5'd4, 5'd3, 5'd3),          // 04 r4 = 2 * r3
    addi_(5'd5, 5'd0, 16'h0001),     // 08 skipped
    add_(5'd5, 5'd4, 5'd1),          // 0c r5 = r4 + r1
    add_(5'd0, 5'd1, 5'd1),          // 10 r0 stays 0
    add_(5'd6, 5'd5, 5'd0),          // 14 r6 = r5
    add_(5'd1, 5'd1, 5'd1)           // 18 r1 doubles
  };
  int exp_cyc [7] = '{6, 6, 3, 6, 6, 6, 6};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r1, r2, exp [32];
    int n, cyc;
    logic [31:0] start_pc;
    foreach (prog[i]) begin
      @(negedge clk);
      host_we = 1; host_addr = 32'(i * 4); host_wdata = prog[i];
    end
    @(negedge clk);
    host_we = 0;
    rst = 0;
    r1 = $urandom; r2 = $urandom;
    dut.u_rf.r[1] = r1;
    dut.u_rf.r[2] = r2;
    n = 0; cyc = 0; start_pc = 0;
    while (n < 7) begin
      if (step == 0) begin
        start_pc = pc;
        cyc = 0;
      end
      cyc++;
      if (instr_done) begin
        check(start_pc, 32'(n * 4), $sformatf("address of instruction %0d", n));
        check(32'(cyc), 32'(exp_cyc[n]), $sformatf("cycles of instruction at %h", start_pc));
        n++;
      end
      @(negedge clk);
    end
    foreach (exp[i]) exp[i] = 0;
    exp[1] = r1 + r1; exp[2] = r2; exp[3] = r1 + r2; exp[4] = 2 * (r1 + r2);
    exp[5] = 2 * (r1 + r2) + r1; exp[6] = exp[5];
    for (int r = 0; r < 32; r++) begin
      dbg_reg = 5'(r);
      #1 check(dbg_reg_data, exp[r], $sformatf("register r%0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
