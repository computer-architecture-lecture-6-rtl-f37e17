// mc_cpu: the mux-based multi-cycle MIPS processor (control unit plus
// datapath), without its memory.
//
// Executes R-type add/sub/and/or/slt, ori, lw, sw, beq and j. An
// instruction takes 3 (beq, j), 4 (R-type, ori, sw) or 5 (lw) clock cycles;
// see mc_control for the cycle-by-cycle register transfers. The memory port
// connects to a single instruction-and-data memory that reads
// combinationally (data valid in the cycle the address is given) and
// writes at the clock edge. Reset is synchronous and active high; after it
// the machine fetches from address 0.
//
// Observation outputs: pc, ir, the control state, instr_done (high in the
// last cycle of each instruction) and a debug read port into the register
// file.
module mc_cpu
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        mem_read,
  output logic        mem_write,
  input  logic [31:0] mem_rdata,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output mc_state_t   state,
  output logic        instr_done,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data
);
  mc_ctrl_t   ctrl;
  logic [5:0] opcode;

  mc_control u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .opcode     (opcode),
    .ctrl       (ctrl),
    .state      (state),
    .instr_done (instr_done)
  );

  mc_datapath u_dp (
    .clk          (clk),
    .rst          (rst),
    .ctrl         (ctrl),
    .opcode       (opcode),
    .mem_addr     (mem_addr),
    .mem_wdata    (mem_wdata),
    .mem_read     (mem_read),
    .mem_write    (mem_write),
    .mem_rdata    (mem_rdata),
    .pc           (pc),
    .ir           (ir),
    .dbg_reg      (dbg_reg),
    .dbg_reg_data (dbg_reg_data)
  );

endmodule
