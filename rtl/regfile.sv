// regfile: 32 general purpose registers of 32 bits.
//
// Two read ports (Read register 1/2 -> Read data 1/2) answer
// combinationally; the write port stores Write data into Write register at
// the rising clock edge when RegWrite is high. Register 0 always reads as
// zero and ignores writes, as in the MIPS architecture. A third read port
// (dbg_*) lets a test bench or a debugger look at any register without
// disturbing the machine. The 32 x 32-bit organisation is the document's;
// the zero register and the debug port are this design's choices. Contents
// are cleared by rst.
module regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data
);
  logic [31:0] r [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) r[i] <= '0;
    end else if (we && wa != 5'd0) begin
      r[wa] <= wd;
    end
  end

  assign rd1      = (ra1 == 5'd0) ? '0 : r[ra1];
  assign rd2      = (ra2 == 5'd0) ? '0 : r[ra2];
  assign dbg_data = (dbg_addr == 5'd0) ? '0 : r[dbg_addr];

endmodule
