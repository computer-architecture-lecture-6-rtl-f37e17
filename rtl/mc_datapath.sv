// mc_datapath: datapath of the mux-based multi-cycle MIPS.
//
// One memory, one ALU and one register file are reused across the cycles
// of an instruction; values that a later cycle needs are kept in internal
// registers the programmer does not see: IR (instruction), MDR (memory
// data), A and B (register file outputs) and ALUOut (ALU output). PC and IR
// load only when the control asks (PCWrite / PCWriteCond and Zero, IRWrite);
// MDR, A, B and ALUOut load at every clock edge, as no write enable is drawn
// for them, so each holds the value produced in the previous cycle.
//
// Multiplexers (select 0 / 1 / 2 / 3):
//   IorD      memory address      PC, ALUOut
//   RegDst    write register      IR[20:16] (rt), IR[15:11] (rd)
//   MemtoReg  register write data ALUOut, MDR
//   ALUSrcA   ALU operand 1       PC, A
//   ALUSrcB   ALU operand 2       B, 4, ext(IR[15:0]), ext(IR[15:0]) << 2
//   PCSource  next PC             ALU result, ALUOut,
//                                 {PC[31:28], IR[25:0], 2'b00}
// The immediate is sign or zero extended as ExtOp says. The PC is written
// when PCWrite is high, or when PCWriteCond is high and the ALU's Zero is.
// The structure follows the document's datapath figure; the register-file
// debug port and the synchronous active-high reset (PC and the internal
// registers to zero) are this design's additions.
module mc_datapath
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  mc_ctrl_t    ctrl,
  output logic [5:0]  opcode,
  // memory port
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        mem_read,
  output logic        mem_write,
  input  logic [31:0] mem_rdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] ir,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data
);
  logic [31:0] mdr, a_q, b_q, alu_out;
  logic [31:0] rd1, rd2, wd, ext, src_a, src_b, alu_res, pc_next, jump_addr;
  logic [4:0]  wa;
  logic        zero, pc_en;
  alu_fn_t     fn;

  // Registers
  assign pc_en = ctrl.pc_write | (ctrl.pc_write_cond & zero);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      ir      <= '0;
      mdr     <= '0;
      a_q     <= '0;
      b_q     <= '0;
      alu_out <= '0;
    end else begin
      if (pc_en)         pc <= pc_next;
      if (ctrl.ir_write) ir <= mem_rdata;
      mdr     <= mem_rdata;
      a_q     <= rd1;
      b_q     <= rd2;
      alu_out <= alu_res;
    end
  end

  assign opcode = ir[31:26];

  // Memory interface
  assign mem_addr  = ctrl.iord ? alu_out : pc;
  assign mem_wdata = b_q;
  assign mem_read  = ctrl.mem_read;
  assign mem_write = ctrl.mem_write;

  // Register file
  assign wa = ctrl.reg_dst    ? ir[15:11] : ir[20:16];
  assign wd = ctrl.mem_to_reg ? mdr       : alu_out;

  regfile u_rf (
    .clk      (clk),
    .rst      (rst),
    .ra1      (ir[25:21]),
    .ra2      (ir[20:16]),
    .rd1      (rd1),
    .rd2      (rd2),
    .we       (ctrl.reg_write),
    .wa       (wa),
    .wd       (wd),
    .dbg_addr (dbg_reg),
    .dbg_data (dbg_reg_data)
  );

  // Immediate extension and ALU operand selection
  ext_unit u_ext (
    .imm    (ir[15:0]),
    .ext_op (ctrl.ext_op),
    .ext    (ext)
  );

  assign src_a = ctrl.alu_src_a ? a_q : pc;

  always_comb begin
    unique case (ctrl.alu_src_b)
      SRCB_B:      src_b = b_q;
      SRCB_FOUR:   src_b = 32'd4;
      SRCB_IMM:    src_b = ext;
      SRCB_IMM_SH: src_b = {ext[29:0], 2'b00};
      default:     src_b = b_q;
    endcase
  end

  mc_alu_control u_aluctl (
    .alu_op (ctrl.alu_op),
    .funct  (ir[5:0]),
    .fn     (fn)
  );

  mc_alu u_alu (
    .fn     (fn),
    .a      (src_a),
    .b      (src_b),
    .result (alu_res),
    .zero   (zero)
  );

  // Next PC
  assign jump_addr = {pc[31:28], ir[25:0], 2'b00};

  always_comb begin
    unique case (ctrl.pc_source)
      PCSRC_ALU:    pc_next = alu_res;
      PCSRC_ALUOUT: pc_next = alu_out;
      PCSRC_JUMP:   pc_next = jump_addr;
      default:      pc_next = alu_res;
    endcase
  end

endmodule
