// mc_cpu_tb: self-checking program run on the multi-cycle MIPS processor.
//
// A short program (below, with the expected effect of each line) is loaded
// into a memory through its host port. It uses every instruction class:
// R-type add/sub/and/or/slt, ori (zero extension), sw and lw with positive
// and negative offsets, a taken and a not-taken beq, an unknown opcode and
// j. The bench records for each instruction its address and its length in
// cycles (from fetch to the instr_done pulse) and compares them with the
// expected trace: R-type/ori/sw 4 cycles, lw 5, beq/j 3, unknown 2. At the
// end the registers and the two data words are compared with hand-worked
// values.
module mc_cpu_tb;
  import mips_asm_pkg::*;
  import mips_pkg::*;

  logic clk = 0, rst = 1;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, pc, ir, dbg_reg_data, host_rdata;
  logic [31:0] host_addr = 0, host_wdata = 0;
  logic mem_read, mem_write, instr_done, host_we = 0;
  logic [4:0] dbg_reg = 0;
  mc_state_t state;
  int checks = 0, failures = 0;

  mc_cpu dut (.*);

  memory #(.WORDS(256)) u_mem (
    .clk (clk), .addr (mem_addr), .wdata (mem_wdata), .mem_read (mem_read),
    .mem_write (mem_write), .rdata (mem_rdata), .host_we (host_we),
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
    ori_(5'd1, 5'd0, 16'h0005),     // 00 r1 = 5
    ori_(5'd2, 5'd0, 16'h0007),     // 04 r2 = 7
    add_(5'd3, 5'd1, 5'd2),         // 08 r3 = 12
    sub_(5'd4, 5'd1, 5'd2),         // 0c r4 = -2
    and_(5'd5, 5'd3, 5'd2),         // 10 r5 = 4
    or_ (5'd6, 5'd3, 5'd1),         // 14 r6 = 13
    slt_(5'd7, 5'd4, 5'd1),         // 18 r7 = 1 (-2 < 5)
    sw_ (5'd3, 5'd0, 16'h0100),     // 1c M[100] = 12
    lw_ (5'd8, 5'd0, 16'h0100),     // 20 r8 = 12
    beq_(5'd1, 5'd2, 16'd5),        // 24 not taken
    beq_(5'd3, 5'd8, 16'd2),        // 28 taken -> 34
    ori_(5'd9, 5'd0, 16'hdead),     // 2c skipped
    ori_(5'd9, 5'd0, 16'hbeef),     // 30 skipped
    ori_(5'd11, 5'd0, 16'h0108),    // 34 r11 = 0x108
    sw_ (5'd4, 5'd11, 16'hfffc),    // 38 M[104] = -2
    lw_ (5'd12, 5'd11, 16'hfffc),   // 3c r12 = -2
    addi_(5'd9, 5'd0, 16'h0001),    // 40 unknown: no effect
    j_  (26'h14),                   // 44 -> 50
    ori_(5'd9, 5'd0, 16'h1111),     // 48 skipped
    ori_(5'd9, 5'd0, 16'h2222),     // 4c skipped
    ori_(5'd13, 5'd3, 16'h00f0),    // 50 r13 = 0xfc
    ori_(5'd14, 5'd0, 16'h8000),    // 54 r14 = 0x8000 (zero extended)
    beq_(5'd0, 5'd0, 16'hffff)      // 58 loop here
  };

  int exp_addr [$] = '{'h00, 'h04, 'h08, 'h0c, 'h10, 'h14, 'h18, 'h1c, 'h20, 'h24,
                       'h28, 'h34, 'h38, 'h3c, 'h40, 'h44, 'h50, 'h54, 'h58, 'h58};
  int exp_cyc  [$] = '{4, 4, 4, 4, 4, 4, 4, 4, 5, 3,
                       3, 4, 4, 5, 2, 3, 4, 4, 3, 3};

  logic [31:0] exp_reg [32];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cyc;
    logic [31:0] start_pc;
    foreach (prog[i]) begin
      @(negedge clk);
      host_we = 1; host_addr = 32'(i * 4); host_wdata = prog[i];
    end
    @(negedge clk);
    host_we = 0;
    rst = 0;
    n = 0;
    cyc = 0;
    start_pc = 0;
    while (n < exp_addr.size()) begin
      if (state == S_IF) begin
        start_pc = pc;
        cyc = 0;
      end
      cyc++;
      if (instr_done) begin
        check(start_pc, 32'(exp_addr[n]), $sformatf("address of instruction %0d", n));
        check(32'(cyc), 32'(exp_cyc[n]), $sformatf("cycles of instruction at %h", start_pc));
        n++;
      end
      @(negedge clk);
    end
    foreach (exp_reg[i]) exp_reg[i] = 0;
    exp_reg[1] = 5; exp_reg[2] = 7; exp_reg[3] = 12; exp_reg[4] = 32'hffff_fffe;
    exp_reg[5] = 4; exp_reg[6] = 13; exp_reg[7] = 1; exp_reg[8] = 12;
    exp_reg[11] = 32'h108; exp_reg[12] = 32'hffff_fffe; exp_reg[13] = 32'hfc;
    exp_reg[14] = 32'h8000;
    for (int r = 0; r < 32; r++) begin
      dbg_reg = 5'(r);
      #1 check(dbg_reg_data, exp_reg[r], $sformatf("register r%0d", r));
    end
    host_addr = 32'h100;
    #1 check(host_rdata, 32'd12, "M[0x100]");
    host_addr = 32'h104;
    #1 check(host_rdata, 32'hffff_fffe, "M[0x104]");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
