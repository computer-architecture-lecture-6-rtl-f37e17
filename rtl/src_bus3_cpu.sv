// src_bus3_cpu: multi-cycle MIPS machine with three 32-bit buses.
//
// Bus A is the ALU's first operand and bus B its second; bus C carries the
// ALU result into any register. The register file drives bus A (port rs)
// and bus B (port rt) at once, so a register-register add is a single
// transfer. IR, PC and MD drive bus B; the register file, IR, PC, MA and MD
// load from bus C. MA can also take its value straight from bus B and is
// transparent: an address put on bus B reaches the memory in the same cycle,
// which lets MA <- PC and MD <- M[MA] happen together. PC, by contrast, is
// edge-triggered, so it can be read onto bus B and rewritten from bus C in
// one cycle.
//
// Register transfers, one clock cycle each:
//   T0  MA <- PC, MD <- M[MA], PC <- PC + 4   (INC4)
//   T1  IR <- MD                              (PASS_B)
//   T2  RF[rd] <- RF[rs] + RF[rt]             (ADD)
// so add takes 3 cycles. The transfers are the document's. The transparent
// MA is modelled without a latch: a register holds the last value, and the
// memory address is bus B itself in a cycle that loads MA from bus B. Only
// add (opcode 0, function 100000) is known; any other word is skipped after
// T1 (2 cycles, this design's choice). Bus B is an AND-OR multiplexer of the
// enabled sources, checked by an assertion to have at most one. Reset
// (synchronous, active high) clears all registers and starts at T0 with
// PC = 0. instr_done is high in the last cycle of each instruction.
module src_bus3_cpu
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] mem_addr,
  output logic        mem_read,
  input  logic [31:0] mem_rdata,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [1:0]  step,
  output logic        instr_done,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data
);
  typedef enum logic [1:0] {T0, T1, T2} step_t;

  step_t       st, st_next;
  logic [31:0] ma, md, bus_a, bus_b, bus_c, rf_a, rf_b;
  src_alu_fn_t fn;

  logic pc_out, md_out, rf_out;
  logic pc_in, ir_in, ma_in_b, rf_in, md_rd;
  logic is_add;

  // in T1 the instruction is on its way from MD to IR
  assign is_add = (md[31:26] == OP_RTYPE) && (md[5:0] == FN_ADD);

  always_comb begin
    {pc_out, md_out, rf_out} = '0;
    {pc_in, ir_in, ma_in_b, rf_in, md_rd} = '0;
    fn         = SALU_PASSB;
    instr_done = 1'b0;
    st_next    = T0;
    unique case (st)
      T0: begin
        pc_out = 1'b1; ma_in_b = 1'b1; md_rd = 1'b1;
        fn = SALU_INC4; pc_in = 1'b1; st_next = T1;
      end
      T1: begin
        md_out = 1'b1; fn = SALU_PASSB; ir_in = 1'b1;
        st_next    = is_add ? T2 : T0;
        instr_done = !is_add;
      end
      T2: begin
        rf_out = 1'b1; fn = SALU_ADD; rf_in = 1'b1;
        instr_done = 1'b1; st_next = T0;
      end
      default: st_next = T0;
    endcase
  end

  // buses
  assign bus_a = {32{rf_out}} & rf_a;
  assign bus_b = ({32{pc_out}} & pc) | ({32{md_out}} & md) | ({32{rf_out}} & rf_b);

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert ((3'({pc_out, md_out, rf_out}) & (3'({pc_out, md_out, rf_out}) - 3'd1)) == 3'd0)
        else $error("src_bus3_cpu: more than one source drives bus B");
    end
  end

  src_alu u_alu (
    .fn (fn),
    .a  (bus_a),
    .b  (bus_b),
    .c  (bus_c)
  );

  regfile u_rf (
    .clk      (clk),
    .rst      (rst),
    .ra1      (ir[25:21]),
    .ra2      (ir[20:16]),
    .rd1      (rf_a),
    .rd2      (rf_b),
    .we       (rf_in),
    .wa       (ir[15:11]),
    .wd       (bus_c),
    .dbg_addr (dbg_reg),
    .dbg_data (dbg_reg_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T0;
      pc <= '0; ir <= '0; ma <= '0; md <= '0;
    end else begin
      st <= st_next;
      if (pc_in)   pc <= bus_c;
      if (ir_in)   ir <= bus_c;
      if (ma_in_b) ma <= bus_b;
      if (md_rd)   md <= mem_rdata;
    end
  end

  // transparent MA: the address passes through in the cycle it is loaded
  assign mem_addr = ma_in_b ? bus_b : ma;
  assign mem_read = md_rd;
  assign step     = st;

endmodule
