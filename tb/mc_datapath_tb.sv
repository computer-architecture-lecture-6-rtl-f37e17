// mc_datapath_tb: self-checking test of the multi-cycle datapath alone.
//
// The bench plays the control unit: for each instruction of a short
// program it applies, cycle by cycle, the control signals of the control
// table (fetch, decode, then the instruction's own rows), with beq taken
// and not taken and a jump. After every instruction it checks the PC, and
// at the end the registers and the stored word. Expected values are worked
// out by hand.
module mc_datapath_tb;
  import mips_asm_pkg::*;
  import mips_pkg::*;

  logic clk = 0, rst = 1;
  mc_ctrl_t ctrl;
  logic [5:0] opcode;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, pc, ir, dbg_reg_data, host_rdata;
  logic [31:0] host_addr = 0, host_wdata = 0;
  logic mem_read, mem_write, host_we = 0;
  logic [4:0] dbg_reg = 0;
  int checks = 0, failures = 0;

  mc_datapath dut (.*);

  memory #(.WORDS(64)) u_mem (
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

  // apply one control row for one clock cycle
  task automatic cyc(input logic iord, mr, mw, irw, rdst, m2r, rw, ext, sa,
                     input logic [1:0] sb, op, ps, input logic pwc, pw);
    ctrl = '{pc_write: pw, pc_write_cond: pwc, iord: iord, mem_read: mr,
             mem_write: mw, mem_to_reg: m2r, ir_write: irw, reg_dst: rdst,
             reg_write: rw, ext_op: ext, alu_src_a: sa, alu_src_b: srcb_t'(sb),
             alu_op: aluop_t'(op), pc_source: pcsrc_t'(ps)};
    @(negedge clk);
  endtask

  task automatic fetch_decode();
    cyc(0, 1, 0, 1, 0, 0, 0, 0, 0, 2'd1, 2'd0, 2'd0, 0, 1);   // T0
    cyc(0, 0, 0, 0, 0, 0, 0, 1, 0, 2'd3, 2'd0, 2'd0, 0, 0);   // T1
  endtask

  task automatic do_r();
    fetch_decode();
    cyc(0, 0, 0, 0, 0, 0, 0, 0, 1, 2'd0, 2'd2, 2'd0, 0, 0);
    cyc(0, 0, 0, 0, 1, 0, 1, 0, 0, 2'd0, 2'd0, 2'd0, 0, 0);
  endtask
  task automatic do_ori();
    fetch_decode();
    cyc(0, 0, 0, 0, 0, 0, 0, 0, 1, 2'd2, 2'd3, 2'd0, 0, 0);
    cyc(0, 0, 0, 0, 0, 0, 1, 0, 0, 2'd0, 2'd0, 2'd0, 0, 0);
  endtask
  task automatic do_lw();
    fetch_decode();
    cyc(0, 0, 0, 0, 0, 0, 0, 1, 1, 2'd2, 2'd0, 2'd0, 0, 0);
    cyc(1, 1, 0, 0, 0, 0, 0, 0, 0, 2'd0, 2'd0, 2'd0, 0, 0);
    cyc(0, 0, 0, 0, 0, 1, 1, 0, 0, 2'd0, 2'd0, 2'd0, 0, 0);
  endtask
  task automatic do_sw();
    fetch_decode();
    cyc(0, 0, 0, 0, 0, 0, 0, 1, 1, 2'd2, 2'd0, 2'd0, 0, 0);
    cyc(1, 0, 1, 0, 0, 0, 0, 0, 0, 2'd0, 2'd0, 2'd0, 0, 0);
  endtask
  task automatic do_beq();
    fetch_decode();
    cyc(0, 0, 0, 0, 0, 0, 0, 0, 1, 2'd0, 2'd1, 2'd1, 1, 0);
  endtask
  task automatic do_j();
    fetch_decode();
    cyc(0, 0, 0, 0, 0, 0, 0, 0, 0, 2'd0, 2'd0, 2'd2, 0, 1);
  endtask

  logic [31:0] prog [$] = '{
    ori_(5'd1, 5'd0, 16'h1234),   // 00 r1 = 0x1234
    ori_(5'd2, 5'd0, 16'h00ff),   // 04 r2 = 0xff
    and_(5'd3, 5'd1, 5'd2),       // 08 r3 = 0x34
    sw_ (5'd1, 5'd0, 16'h0080),   // 0c M[0x80] = 0x1234
    lw_ (5'd4, 5'd0, 16'h0080),   // 10 r4 = 0x1234
    beq_(5'd1, 5'd2, 16'd3),      // 14 not taken
    beq_(5'd1, 5'd4, 16'd2),      // 18 taken -> 0x24
    32'h0, 32'h0,                 // 1c, 20
    j_  (26'h10),                 // 24 -> 0x40
    32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0,  // 28..3c
    ori_(5'd5, 5'd4, 16'h000f)    // 40 r5 = 0x123f
  };

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0;
    foreach (prog[i]) begin
      @(negedge clk);
      host_we = 1; host_addr = 32'(i * 4); host_wdata = prog[i];
    end
    @(negedge clk);
    host_we = 0;
    rst = 0;
    do_ori();  check(pc, 32'h04, "pc after ori");
    check(32'(opcode), 32'h0d, "opcode field of IR");
    do_ori();  check(pc, 32'h08, "pc after ori");
    do_r();    check(pc, 32'h0c, "pc after and");
    do_sw();   check(pc, 32'h10, "pc after sw");
    do_lw();   check(pc, 32'h14, "pc after lw");
    do_beq();  check(pc, 32'h18, "pc after beq not taken");
    do_beq();  check(pc, 32'h24, "pc after beq taken");
    do_j();    check(pc, 32'h40, "pc after j");
    do_ori();  check(pc, 32'h44, "pc after last ori");
    dbg_reg = 1; #1 check(dbg_reg_data, 32'h1234, "r1");
    dbg_reg = 2; #1 check(dbg_reg_data, 32'h00ff, "r2");
    dbg_reg = 3; #1 check(dbg_reg_data, 32'h0034, "r3");
    dbg_reg = 4; #1 check(dbg_reg_data, 32'h1234, "r4");
    dbg_reg = 5; #1 check(dbg_reg_data, 32'h123f, "r5");
    host_addr = 32'h80; #1 check(host_rdata, 32'h1234, "M[0x80]");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
