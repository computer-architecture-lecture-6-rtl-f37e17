// mips_pkg: types and constants shared by the multi-cycle MIPS machines.
//
// Holds the instruction-field encodings of the supported MIPS subset, the
// ALU operation codes of the mux-based datapath, the 2-bit select codes of
// its multiplexers (ALUOp, ALUSrcB, PCSource) and the control-signal bundle
// that the control unit hands to the datapath. The select codes follow the
// tables of the 2-bit control signals; the opcode and function-field values
// are the standard MIPS32 encodings, which the design adopts as its own.
// ALUOp 2'b11 ("or", used by ORI) is this design's choice.
package mips_pkg;

  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      regaddr_t;

  // Primary opcodes (IR[31:26])
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;

  // Function field (IR[5:0]) of R-type instructions
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // Operation performed by the main ALU
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_fn_t;

  // ALUOp from the control unit to the ALU control
  typedef enum logic [1:0] {
    ALUOP_ADD  = 2'b00,
    ALUOP_SUB  = 2'b01,
    ALUOP_FUNC = 2'b10,
    ALUOP_OR   = 2'b11
  } aluop_t;

  // ALUSrcB select
  typedef enum logic [1:0] {
    SRCB_B      = 2'b00,
    SRCB_FOUR   = 2'b01,
    SRCB_IMM    = 2'b10,
    SRCB_IMM_SH = 2'b11
  } srcb_t;

  // PCSource select
  typedef enum logic [1:0] {
    PCSRC_ALU    = 2'b00,
    PCSRC_ALUOUT = 2'b01,
    PCSRC_JUMP   = 2'b10
  } pcsrc_t;

  // Control signals of the mux-based datapath (one field per signal of
  // the control tables)
  typedef struct packed {
    logic   pc_write;
    logic   pc_write_cond;
    logic   iord;
    logic   mem_read;
    logic   mem_write;
    logic   mem_to_reg;
    logic   ir_write;
    logic   reg_dst;
    logic   reg_write;
    logic   ext_op;
    logic   alu_src_a;
    srcb_t  alu_src_b;
    aluop_t alu_op;
    pcsrc_t pc_source;
  } mc_ctrl_t;

  // States of the mux-based control unit, one per row of the control table
  typedef enum logic [3:0] {
    S_IF      = 4'd0,   // T0 fetch
    S_ID      = 4'd1,   // T1 decode / register fetch
    S_EX_R    = 4'd2,   // T2 R-type execute
    S_WB_R    = 4'd3,   // T3 R-type write back
    S_EX_ORI  = 4'd4,   // T2 ORI execute
    S_WB_ORI  = 4'd5,   // T3 ORI write back
    S_EX_LW   = 4'd6,   // T2 LW address
    S_M_LW    = 4'd7,   // T3 LW memory read
    S_WB_LW   = 4'd8,   // T4 LW write back
    S_EX_SW   = 4'd9,   // T2 SW address
    S_M_SW    = 4'd10,  // T3 SW memory write
    S_EX_BEQ  = 4'd11,  // T2 BEQ completion
    S_EX_J    = 4'd12   // T2 J completion
  } mc_state_t;

  // Operation performed by the ALU of the bus-based machines
  typedef enum logic [1:0] {
    SALU_ADD   = 2'd0,
    SALU_INC4  = 2'd1,
    SALU_PASSB = 2'd2
  } src_alu_fn_t;

endpackage
