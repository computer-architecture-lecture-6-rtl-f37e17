// mc_control_tb: self-checking test of the multi-cycle control unit.
//
// For every instruction class (R-type, ori, lw, sw, beq, j and an unknown
// opcode) the opcode is held while the FSM walks through the instruction.
// Each cycle the control outputs are compared with the row of the control
// table written out below (-1 marks a don't-care), the cycle count of each
// class is checked (R/ori/sw 4, lw 5, beq/j 3, unknown 2) and instr_done
// must pulse exactly in the last cycle.
module mc_control_tb;
  import mips_pkg::*;

  logic clk = 0, rst = 1;
  logic [5:0] opcode = 0;
  mc_ctrl_t ctrl;
  mc_state_t state;
  logic instr_done;
  int checks = 0, failures = 0;

  mc_control dut (.*);

  always #5 clk = ~clk;

  // IorD MemRead MemWrite IRWrite RegDst MemtoReg RegWrite ExtOp
  // ALUSrcA ALUSrcB ALUOp(0 add,1 sub,2 func,3 or) PCSource PCWriteCond PCWrite
  typedef int row_t [14];
  localparam row_t R_IF   = '{ 0, 1, 0, 1,-1,-1, 0,-1, 0, 1, 0, 0, 0, 1};
  localparam row_t R_ID   = '{-1, 0, 0, 0,-1,-1, 0, 1, 0, 3, 0,-1, 0, 0};
  localparam row_t R_EXR  = '{-1, 0, 0, 0,-1,-1, 0,-1, 1, 0, 2,-1, 0, 0};
  localparam row_t R_WBR  = '{-1, 0, 0, 0, 1, 0, 1,-1,-1,-1,-1,-1, 0, 0};
  localparam row_t R_EXO  = '{-1, 0, 0, 0,-1,-1, 0, 0, 1, 2, 3,-1, 0, 0};
  localparam row_t R_WBO  = '{-1, 0, 0, 0, 0, 0, 1,-1,-1,-1,-1,-1, 0, 0};
  localparam row_t R_EXM  = '{-1, 0, 0, 0,-1,-1, 0, 1, 1, 2, 0,-1, 0, 0};
  localparam row_t R_MLW  = '{ 1, 1, 0, 0,-1,-1, 0,-1,-1,-1,-1,-1, 0, 0};
  localparam row_t R_WBLW = '{-1, 0, 0, 0, 0, 1, 1,-1,-1,-1,-1,-1, 0, 0};
  localparam row_t R_MSW  = '{ 1, 0, 1, 0,-1,-1, 0,-1,-1,-1,-1,-1, 0, 0};
  localparam row_t R_BEQ  = '{-1, 0, 0, 0,-1,-1, 0,-1, 1, 0, 1, 1, 1, 0};
  localparam row_t R_J    = '{-1, 0, 0, 0,-1,-1, 0,-1,-1,-1,-1, 2, 0, 1};

  function automatic row_t actual();
    row_t r;
    r = '{int'(ctrl.iord), int'(ctrl.mem_read), int'(ctrl.mem_write), int'(ctrl.ir_write),
          int'(ctrl.reg_dst), int'(ctrl.mem_to_reg), int'(ctrl.reg_write), int'(ctrl.ext_op),
          int'(ctrl.alu_src_a), int'(ctrl.alu_src_b), int'(ctrl.alu_op), int'(ctrl.pc_source),
          int'(ctrl.pc_write_cond), int'(ctrl.pc_write)};
    return r;
  endfunction

  task automatic check_row(input row_t exp, input string what, input int cyc);
    row_t got = actual();
    checks++;
    for (int i = 0; i < 14; i++) begin
      if (exp[i] >= 0 && got[i] != exp[i]) begin
        failures++;
        $display("FAIL %s cycle %0d: signal %0d is %0d, expected %0d", what, cyc, i, got[i], exp[i]);
        break;
      end
    end
  endtask

  // run one instruction: rows must appear in order, instr_done on the last
  task automatic run(input logic [5:0] op, input string name, input row_t rows [$]);
    opcode = op;
    foreach (rows[c]) begin
      check_row(rows[c], name, c);
      checks++;
      if (instr_done !== (c == rows.size() - 1)) begin
        failures++;
        $display("FAIL %s cycle %0d: instr_done=%b", name, c, instr_done);
      end
      @(negedge clk);
    end
    checks++;
    if (state !== S_IF) begin
      failures++;
      $display("FAIL %s: did not return to fetch after %0d cycles", name, rows.size());
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      run(6'h00, "R-type", '{R_IF, R_ID, R_EXR, R_WBR});
      run(6'h0d, "ori",    '{R_IF, R_ID, R_EXO, R_WBO});
      run(6'h23, "lw",     '{R_IF, R_ID, R_EXM, R_MLW, R_WBLW});
      run(6'h2b, "sw",     '{R_IF, R_ID, R_EXM, R_MSW});
      run(6'h04, "beq",    '{R_IF, R_ID, R_BEQ});
      run(6'h02, "j",      '{R_IF, R_ID, R_J});
      run(6'h08, "unknown",'{R_IF, R_ID});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
