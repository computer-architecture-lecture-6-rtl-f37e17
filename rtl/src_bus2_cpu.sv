// src_bus2_cpu: multi-cycle MIPS machine with two 32-bit buses.
//
// Bus B (the "out" bus) carries data coming from registers: the register
// file, IR, PC and MD each have an output enable onto it. Bus A (the "in"
// bus) carries data going into registers; its only source is the ALU
// output C, and the register file, IR, PC, MA, MD and the ALU's operand
// register A all load from it. The ALU's first input is register A, its
// second input is bus B. Every plain transfer passes through the ALU with
// the function C = B (PASS_B).
//
// Register transfers, one clock cycle each:
//   T0  MA <- PC                         (PASS_B)
//   T1  PC <- PC + 4, MD <- M[MA]        (INC4)
//   T2  IR <- MD                         (PASS_B)
//   T3  A <- RF[rs]                      (PASS_B)
//   T4  RF[rd] <- A + RF[rt]             (ADD)
// so add takes 5 cycles, one less than on the single bus, because the ALU
// result can be written in the cycle it is computed. The transfers are the
// document's. Only add (opcode 0, function 100000) is known; any other word
// is skipped after T2 (3 cycles, this design's choice). Bus B is an AND-OR
// multiplexer of the enabled sources, checked by an assertion to have at
// most one. Reset (synchronous, active high) clears all registers and
// starts at T0 with PC = 0. The memory port reads combinationally from MA.
// instr_done is high in the last cycle of each instruction.
module src_bus2_cpu
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] mem_addr,
  output logic        mem_read,
  input  logic [31:0] mem_rdata,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [2:0]  step,
  output logic        instr_done,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data
);
  typedef enum logic [2:0] {T0, T1, T2, T3, T4} step_t;
  typedef enum logic [1:0] {F_RS, F_RT, F_RD} field_t;

  step_t       st, st_next;
  logic [31:0] ma, md, a_q, bus_a, bus_b, rf_q, unused_rd2;
  logic [4:0]  rf_rd_addr, rf_wr_addr;
  field_t      field;
  src_alu_fn_t fn;

  logic pc_out, md_out, rf_out;
  logic pc_in, ir_in, ma_in, a_in, rf_in, md_rd;
  logic is_add;

  assign is_add = (md[31:26] == OP_RTYPE) && (md[5:0] == FN_ADD);

  always_comb begin
    {pc_out, md_out, rf_out} = '0;
    {pc_in, ir_in, ma_in, a_in, rf_in, md_rd} = '0;
    field      = F_RS;
    fn         = SALU_PASSB;
    instr_done = 1'b0;
    st_next    = T0;
    unique case (st)
      T0: begin pc_out = 1'b1; fn = SALU_PASSB; ma_in = 1'b1; st_next = T1; end
      T1: begin pc_out = 1'b1; fn = SALU_INC4; pc_in = 1'b1; md_rd = 1'b1; st_next = T2; end
      T2: begin
        md_out = 1'b1; fn = SALU_PASSB; ir_in = 1'b1;
        st_next    = is_add ? T3 : T0;
        instr_done = !is_add;
      end
      T3: begin rf_out = 1'b1; field = F_RS; fn = SALU_PASSB; a_in = 1'b1; st_next = T4; end
      T4: begin
        rf_out = 1'b1; field = F_RT; fn = SALU_ADD; rf_in = 1'b1;
        instr_done = 1'b1; st_next = T0;
      end
      default: st_next = T0;
    endcase
  end

  // out bus B: many sources; in bus A: the ALU output
  assign bus_b = ({32{pc_out}} & pc) | ({32{md_out}} & md) | ({32{rf_out}} & rf_q);

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert ((3'({pc_out, md_out, rf_out}) & (3'({pc_out, md_out, rf_out}) - 3'd1)) == 3'd0)
        else $error("src_bus2_cpu: more than one source drives bus B");
    end
  end

  src_alu u_alu (
    .fn (fn),
    .a  (a_q),
    .b  (bus_b),
    .c  (bus_a)
  );

  // read the field named by the step; the write always goes to rd
  assign rf_rd_addr = (field == F_RT) ? ir[20:16] : ir[25:21];
  assign rf_wr_addr = ir[15:11];

  regfile u_rf (
    .clk      (clk),
    .rst      (rst),
    .ra1      (rf_rd_addr),
    .ra2      (5'd0),
    .rd1      (rf_q),
    .rd2      (unused_rd2),
    .we       (rf_in),
    .wa       (rf_wr_addr),
    .wd       (bus_a),
    .dbg_addr (dbg_reg),
    .dbg_data (dbg_reg_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T0;
      pc <= '0; ir <= '0; ma <= '0; md <= '0; a_q <= '0;
    end else begin
      st <= st_next;
      if (pc_in) pc  <= bus_a;
      if (ir_in) ir  <= bus_a;
      if (ma_in) ma  <= bus_a;
      if (md_rd) md  <= mem_rdata;
      if (a_in)  a_q <= bus_a;
    end
  end

  assign mem_addr = ma;
  assign mem_read = md_rd;
  assign step     = st;

endmodule
