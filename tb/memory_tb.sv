// memory_tb: self-checking test of the unified memory.
//
// Fills the memory through the host port with a pseudo-random pattern,
// reads it back through the CPU port (combinational, gated by mem_read),
// overwrites some words through the CPU port and checks them through the
// host port, and checks that the two low address bits are ignored.
module memory_tb;
  localparam int W = 64;
  logic clk = 0;
  logic [31:0] addr = 0, wdata = 0, rdata, host_addr = 0, host_wdata = 0, host_rdata;
  logic mem_read = 0, mem_write = 0, host_we = 0;
  int checks = 0, failures = 0;
  logic [31:0] model [W];

  memory #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      model[i] = $urandom;
      @(negedge clk);
      host_we = 1; host_addr = 32'(i * 4); host_wdata = model[i];
    end
    @(negedge clk) host_we = 0;
    for (int i = 0; i < W; i++) begin
      addr = 32'(i * 4) | 32'($urandom_range(0, 3)); mem_read = 1;
      #1 check(rdata, model[i], "cpu read");
      mem_read = 0;
      #1 check(rdata, 32'd0, "read gated by mem_read");
    end
    for (int k = 0; k < 40; k++) begin
      int i;
      i = $urandom_range(0, W - 1);
      @(negedge clk);
      addr = 32'(i * 4); wdata = $urandom; mem_write = 1; model[i] = wdata;
      @(negedge clk) mem_write = 0;
      host_addr = 32'(i * 4);
      #1 check(host_rdata, model[i], "cpu write, host read");
    end
    for (int i = 0; i < W; i++) begin
      host_addr = 32'(i * 4);
      #1 check(host_rdata, model[i], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
