// mc_control: finite state machine of the mux-based multi-cycle MIPS.
//
// Every instruction starts with the same two cycles: T0 (IF) fetches
// IR <- M[PC] and writes PC <- PC+4 through the ALU; T1 (ID) loads A and B
// from the register file and, in the same cycle, lets the ALU compute the
// branch target PC + (sign-extended offset << 2) into ALUOut, so that a
// branch can finish in T2. At the end of T1 the opcode picks the next state:
//   R-type: EX_R (ALUOut <- A op B)        -> WB_R   (RF[rd] <- ALUOut)
//   ORI:    EX_ORI (ALUOut <- A | zext)    -> WB_ORI (RF[rt] <- ALUOut)
//   LW:     EX_LW (ALUOut <- A + sext)     -> M_LW (MDR <- M[ALUOut])
//                                          -> WB_LW (RF[rt] <- MDR)
//   SW:     EX_SW (ALUOut <- A + sext)     -> M_SW (M[ALUOut] <- B)
//   BEQ:    EX_BEQ (A - B; PC <- ALUOut if Zero)
//   J:      EX_J (PC <- PC[31:28] || IR[25:0] << 2)
// so R-type, ORI and SW take 4 cycles, LW 5, BEQ and J 3. Each state drives
// the control signals of its row of the control table; don't-care entries
// are driven low. An opcode the machine does not know returns to IF after
// ID, i.e. executes as a 2-cycle no-operation (this design's choice).
//
// Outputs are Moore outputs of the state (combinational from the state
// register). instr_done is high in the last cycle of every instruction.
// Synchronous active-high reset enters IF.
module mc_control
  import mips_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic [5:0] opcode,
  output mc_ctrl_t  ctrl,
  output mc_state_t state,
  output logic      instr_done
);
  mc_state_t next;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IF;
    else     state <= next;
  end

  // Next state
  always_comb begin
    unique case (state)
      S_IF: next = S_ID;
      S_ID: begin
        unique case (opcode)
          OP_RTYPE: next = S_EX_R;
          OP_ORI:   next = S_EX_ORI;
          OP_LW:    next = S_EX_LW;
          OP_SW:    next = S_EX_SW;
          OP_BEQ:   next = S_EX_BEQ;
          OP_J:     next = S_EX_J;
          default:  next = S_IF;
        endcase
      end
      S_EX_R:   next = S_WB_R;
      S_EX_ORI: next = S_WB_ORI;
      S_EX_LW:  next = S_M_LW;
      S_M_LW:   next = S_WB_LW;
      S_EX_SW:  next = S_M_SW;
      default:  next = S_IF;
    endcase
  end

  // Control signal table
  always_comb begin
    ctrl = '0;   // every signal deasserted; selects at code 0
    instr_done = 1'b0;
    unique case (state)
      S_IF: begin
        ctrl.mem_read  = 1'b1;
        ctrl.ir_write  = 1'b1;
        ctrl.alu_src_a = 1'b0;
        ctrl.alu_src_b = SRCB_FOUR;
        ctrl.alu_op    = ALUOP_ADD;
        ctrl.pc_source = PCSRC_ALU;
        ctrl.pc_write  = 1'b1;
      end
      S_ID: begin
        ctrl.ext_op    = 1'b1;
        ctrl.alu_src_a = 1'b0;
        ctrl.alu_src_b = SRCB_IMM_SH;
        ctrl.alu_op    = ALUOP_ADD;
        instr_done     = !(opcode inside {OP_RTYPE, OP_ORI, OP_LW, OP_SW, OP_BEQ, OP_J});
      end
      S_EX_R: begin
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = SRCB_B;
        ctrl.alu_op    = ALUOP_FUNC;
      end
      S_WB_R: begin
        ctrl.reg_dst    = 1'b1;
        ctrl.mem_to_reg = 1'b0;
        ctrl.reg_write  = 1'b1;
        instr_done      = 1'b1;
      end
      S_EX_ORI: begin
        ctrl.ext_op    = 1'b0;
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = SRCB_IMM;
        ctrl.alu_op    = ALUOP_OR;
      end
      S_WB_ORI: begin
        ctrl.reg_dst    = 1'b0;
        ctrl.mem_to_reg = 1'b0;
        ctrl.reg_write  = 1'b1;
        instr_done      = 1'b1;
      end
      S_EX_LW, S_EX_SW: begin
        ctrl.ext_op    = 1'b1;
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = SRCB_IMM;
        ctrl.alu_op    = ALUOP_ADD;
      end
      S_M_LW: begin
        ctrl.iord     = 1'b1;
        ctrl.mem_read = 1'b1;
      end
      S_WB_LW: begin
        ctrl.reg_dst    = 1'b0;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
        instr_done      = 1'b1;
      end
      S_M_SW: begin
        ctrl.iord      = 1'b1;
        ctrl.mem_write = 1'b1;
        instr_done     = 1'b1;
      end
      S_EX_BEQ: begin
        ctrl.alu_src_a     = 1'b1;
        ctrl.alu_src_b     = SRCB_B;
        ctrl.alu_op        = ALUOP_SUB;
        ctrl.pc_source     = PCSRC_ALUOUT;
        ctrl.pc_write_cond = 1'b1;
        instr_done         = 1'b1;
      end
      S_EX_J: begin
        ctrl.pc_source = PCSRC_JUMP;
        ctrl.pc_write  = 1'b1;
        instr_done     = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
