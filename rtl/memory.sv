// memory: the single memory that holds both instructions and data.
//
// A multi-cycle machine fetches the instruction and accesses data in
// different clock cycles, so one memory serves both. The CPU port reads
// combinationally: rdata shows the addressed word in the same cycle, which
// is what lets the fetch cycle load IR (or MD) at the end of that cycle.
// rdata is zero while mem_read is low. A write (mem_write) takes effect at
// the rising clock edge. Addresses are byte addresses; the memory is word
// organised and ignores addr[1:0], and the upper address bits wrap.
//
// The host port (host_*) loads a program and reads results back. It writes
// at the clock edge and reads combinationally; if both ports write the same
// word in one cycle, the CPU port wins. The host port and the memory size
// (WORDS) are this design's own; the unified memory itself is the
// document's.
module memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  // CPU port
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        mem_read,
  input  logic        mem_write,
  output logic [31:0] rdata,
  // host port
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  logic [AW-1:0] cpu_idx, host_idx;
  assign cpu_idx  = addr[AW+1:2];
  assign host_idx = host_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (host_we)   mem[host_idx] <= host_wdata;
    if (mem_write) mem[cpu_idx]  <= wdata;
  end

  assign rdata      = mem_read ? mem[cpu_idx] : '0;
  assign host_rdata = mem[host_idx];

endmodule
