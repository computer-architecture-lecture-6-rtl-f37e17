// src_bus1_cpu: multi-cycle MIPS machine built around a single 32-bit bus.
//
// Instead of multiplexers, every register that can be a source has an
// output enable onto one shared bus, and every register that can be a
// destination loads from that bus, so exactly one register transfer can
// happen per cycle. The ALU sits between two extra registers: A holds its
// first operand, its second operand is the bus itself, and its result goes
// to register C, which can in turn drive the bus. Memory is reached through
// MA (address, loaded from the bus) and MD (data, loaded from memory).
//
// Register transfers, one clock cycle each:
//   T0  MA <- PC, C <- PC + 4        (PC on the bus, ALU INC4)
//   T1  MD <- M[MA], PC <- C
//   T2  IR <- MD                     (MD on the bus)
//   T3  A <- RF[rs]
//   T4  C <- A + RF[rt]              (ALU ADD)
//   T5  RF[rd] <- C
// so add takes 6 cycles. The transfers are the document's. The machine
// knows only add (opcode 0, function 100000), the only instruction whose
// transfers are given; any other word is skipped after T2, so it costs 3
// cycles and changes only PC (this design's choice). The bus is an AND-OR
// multiplexer of the enabled sources; an assertion checks that at most one
// source drives it. Reset (synchronous, active high) clears all registers
// and starts at T0 with PC = 0. The memory port reads combinationally from
// MA. instr_done is high in the last cycle of each instruction.
module src_bus1_cpu
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
  typedef enum logic [2:0] {T0, T1, T2, T3, T4, T5} step_t;
  typedef enum logic [1:0] {F_RS, F_RT, F_RD} field_t;

  step_t       st, st_next;
  logic [31:0] ma, md, a_q, c_q, bus, alu_c, rf_q, unused_rd2;
  logic [4:0]  rf_addr;
  field_t      field;
  src_alu_fn_t fn;

  // control: source enables, destination loads
  logic pc_out, md_out, c_out, rf_out;
  logic pc_in, ir_in, ma_in, a_in, c_in, rf_in, md_rd;
  logic is_add;

  assign is_add = (md[31:26] == OP_RTYPE) && (md[5:0] == FN_ADD);

  always_comb begin
    {pc_out, md_out, c_out, rf_out} = '0;
    {pc_in, ir_in, ma_in, a_in, c_in, rf_in, md_rd} = '0;
    field      = F_RS;
    fn         = SALU_PASSB;
    instr_done = 1'b0;
    st_next    = T0;
    unique case (st)
      T0: begin pc_out = 1'b1; ma_in = 1'b1; fn = SALU_INC4; c_in = 1'b1; st_next = T1; end
      T1: begin md_rd = 1'b1; c_out = 1'b1; pc_in = 1'b1; st_next = T2; end
      T2: begin
        md_out = 1'b1; ir_in = 1'b1;
        st_next    = is_add ? T3 : T0;
        instr_done = !is_add;
      end
      T3: begin rf_out = 1'b1; field = F_RS; a_in = 1'b1; st_next = T4; end
      T4: begin rf_out = 1'b1; field = F_RT; fn = SALU_ADD; c_in = 1'b1; st_next = T5; end
      T5: begin c_out = 1'b1; field = F_RD; rf_in = 1'b1; instr_done = 1'b1; st_next = T0; end
      default: st_next = T0;
    endcase
  end

  // the single bus
  assign bus = ({32{pc_out}} & pc) | ({32{md_out}} & md) |
               ({32{c_out}}  & c_q) | ({32{rf_out}} & rf_q);

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert ((4'({pc_out, md_out, c_out, rf_out}) & (4'({pc_out, md_out, c_out, rf_out}) - 4'd1)) == 4'd0)
        else $error("src_bus1_cpu: more than one source drives the bus");
    end
  end

  always_comb begin
    unique case (field)
      F_RS:    rf_addr = ir[25:21];
      F_RT:    rf_addr = ir[20:16];
      default: rf_addr = ir[15:11];
    endcase
  end

  regfile u_rf (
    .clk      (clk),
    .rst      (rst),
    .ra1      (rf_addr),
    .ra2      (5'd0),
    .rd1      (rf_q),
    .rd2      (unused_rd2),
    .we       (rf_in),
    .wa       (rf_addr),
    .wd       (bus),
    .dbg_addr (dbg_reg),
    .dbg_data (dbg_reg_data)
  );

  src_alu u_alu (
    .fn (fn),
    .a  (a_q),
    .b  (bus),
    .c  (alu_c)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T0;
      pc <= '0; ir <= '0; ma <= '0; md <= '0; a_q <= '0; c_q <= '0;
    end else begin
      st <= st_next;
      if (pc_in) pc  <= bus;
      if (ir_in) ir  <= bus;
      if (ma_in) ma  <= bus;
      if (md_rd) md  <= mem_rdata;
      if (a_in)  a_q <= bus;
      if (c_in)  c_q <= alu_c;
    end
  end

  assign mem_addr = ma;
  assign mem_read = md_rd;
  assign step     = st;

endmodule
