// multicycle_top: four multi-cycle MIPS machines side by side.
//
// The machines share nothing but the clock and reset; each has its own
// single instruction-and-data memory and its own host and observation
// ports, gathered into arrays indexed by machine:
//   0  mc_cpu        multiplexer-based datapath with an FSM control unit
//                    (R-type add/sub/and/or/slt, ori, lw, sw, beq, j)
//   1  src_bus1_cpu  one shared bus
//   2  src_bus2_cpu  an in-bus and an out-bus
//   3  src_bus3_cpu  two operand buses and a result bus
// Machines 1-3 execute add only and never write their memory.
//
// The host port of each memory (host_*) loads a program while rst is held
// and reads results afterwards; the dbg_reg / dbg_data pair reads any
// register of a machine's register file. pc shows each machine's program
// counter and ir its instruction register, instr_done pulses in the last
// cycle of every instruction, mc_state is the control state of machine 0 and
// busN_step the step (T0, T1, ...) of bus machine N. Reset is synchronous and
// active high; all machines fetch from address 0 after it. The memories
// hold WORDS 32-bit words (a size this design chose).
module multicycle_top
  import mips_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        host_we    [4],
  input  logic [31:0] host_addr  [4],
  input  logic [31:0] host_wdata [4],
  output logic [31:0] host_rdata [4],
  input  logic [4:0]  dbg_reg    [4],
  output logic [31:0] dbg_data   [4],
  output logic [31:0] pc         [4],
  output logic [31:0] ir         [4],
  output logic        instr_done [4],
  output mc_state_t   mc_state,
  output logic [2:0]  bus1_step,
  output logic [2:0]  bus2_step,
  output logic [1:0]  bus3_step
);
  logic [31:0] maddr [4];
  logic [31:0] mrdata [4];
  logic        mread [4];
  logic [31:0] mc_wdata;
  logic        mc_write;

  mc_cpu u_mc (
    .clk          (clk),
    .rst          (rst),
    .mem_addr     (maddr[0]),
    .mem_wdata    (mc_wdata),
    .mem_read     (mread[0]),
    .mem_write    (mc_write),
    .mem_rdata    (mrdata[0]),
    .pc           (pc[0]),
    .ir           (ir[0]),
    .state        (mc_state),
    .instr_done   (instr_done[0]),
    .dbg_reg      (dbg_reg[0]),
    .dbg_reg_data (dbg_data[0])
  );

  src_bus1_cpu u_bus1 (
    .clk          (clk),
    .rst          (rst),
    .mem_addr     (maddr[1]),
    .mem_read     (mread[1]),
    .mem_rdata    (mrdata[1]),
    .pc           (pc[1]),
    .ir           (ir[1]),
    .step         (bus1_step),
    .instr_done   (instr_done[1]),
    .dbg_reg      (dbg_reg[1]),
    .dbg_reg_data (dbg_data[1])
  );

  src_bus2_cpu u_bus2 (
    .clk          (clk),
    .rst          (rst),
    .mem_addr     (maddr[2]),
    .mem_read     (mread[2]),
    .mem_rdata    (mrdata[2]),
    .pc           (pc[2]),
    .ir           (ir[2]),
    .step         (bus2_step),
    .instr_done   (instr_done[2]),
    .dbg_reg      (dbg_reg[2]),
    .dbg_reg_data (dbg_data[2])
  );

  src_bus3_cpu u_bus3 (
    .clk          (clk),
    .rst          (rst),
    .mem_addr     (maddr[3]),
    .mem_read     (mread[3]),
    .mem_rdata    (mrdata[3]),
    .pc           (pc[3]),
    .ir           (ir[3]),
    .step         (bus3_step),
    .instr_done   (instr_done[3]),
    .dbg_reg      (dbg_reg[3]),
    .dbg_reg_data (dbg_data[3])
  );

  for (genvar m = 0; m < 4; m++) begin : g_mem
    memory #(.WORDS(WORDS)) u_mem (
      .clk        (clk),
      .addr       (maddr[m]),
      .wdata      ((m == 0) ? mc_wdata : 32'd0),
      .mem_read   (mread[m]),
      .mem_write  ((m == 0) ? mc_write : 1'b0),
      .rdata      (mrdata[m]),
      .host_we    (host_we[m]),
      .host_addr  (host_addr[m]),
      .host_wdata (host_wdata[m]),
      .host_rdata (host_rdata[m])
    );
  end

endmodule
