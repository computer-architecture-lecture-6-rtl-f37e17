// multicycle_top_tb: end-to-end test of all four machines at the top's
// default parameters.
//
// Machine 0 (multiplexer-based) runs a program that sums an array of
// NWORDS random words with a lw/add/beq/j loop, stores the sum, and then
// uses slt, sub, and, or, ori, sw and one unknown opcode. An instruction-set
// model inside the bench executes the same program in lockstep: at every
// instr_done pulse it executes one instruction, and the bench checks that
// the machine held the same instruction word in IR and took the cycle count of
// that instruction class (R/ori/sw 4, lw 5, beq/j 3, unknown 2). After the
// program ends, all registers and the data area are compared with the
// model. Machines 1-3 (one, two and three buses) run a chain of add
// instructions with one unknown word in between, again against the model,
// with their own cycle counts (add 6/5/3, skipped word 3/3/2).
//
// The bench counts how often each mechanism happened: every instruction
// class on machine 0, a taken and a not-taken beq, j, an unknown opcode,
// and add and a skipped word on each bus machine. One that never happened
// counts as a failure.
module multicycle_top_tb;
  import mips_asm_pkg::*;
  import mips_pkg::*;

  localparam int NWORDS = 16;
  localparam int NADD   = 29;

  logic clk = 0, rst = 1;
  logic        host_we [4];
  logic [31:0] host_addr [4], host_wdata [4], host_rdata [4];
  logic [4:0]  dbg_reg [4];
  logic [31:0] dbg_data [4], pc [4], ir [4];
  logic        instr_done [4];
  mc_state_t   mc_state;
  logic [2:0]  bus1_step, bus2_step;
  logic [1:0]  bus3_step;
  int checks = 0, failures = 0;

  multicycle_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- model
  typedef struct {
    logic [31:0] pc;
    logic [31:0] r [32];
    logic [31:0] m [int];
  } iss_t;

  iss_t iss [4];

  typedef enum int {K_R, K_ORI, K_LW, K_SW, K_BEQ_T, K_BEQ_N, K_J, K_UNK, K_ADD} kind_t;

  function automatic logic [31:0] rd_mem(int mach, logic [31:0] a);
    int idx = int'(a[11:2]);
    return iss[mach].m.exists(idx) ? iss[mach].m[idx] : 32'd0;
  endfunction

  // execute one instruction on machine 'mach'; returns its kind
  function automatic kind_t step(int mach, bit full_isa);
    logic [31:0] w, rs, rt, simm, zimm, npc, res;
    kind_t k;
    w    = rd_mem(mach, iss[mach].pc);
    rs   = iss[mach].r[w[25:21]];
    rt   = iss[mach].r[w[20:16]];
    simm = {{16{w[15]}}, w[15:0]};
    zimm = {16'd0, w[15:0]};
    npc  = iss[mach].pc + 4;
    if (!full_isa) begin
      if (w[31:26] == 0 && w[5:0] == 6'h20) begin
        if (w[15:11] != 0) iss[mach].r[w[15:11]] = rs + rt;
        k = K_ADD;
      end else k = K_UNK;
    end else begin
      case (w[31:26])
        6'h00: begin
          case (w[5:0])
            6'h20: res = rs + rt;
            6'h22: res = rs - rt;
            6'h24: res = rs & rt;
            6'h25: res = rs | rt;
            6'h2a: res = ($signed(rs) < $signed(rt)) ? 32'd1 : 32'd0;
            default: res = rs + rt;
          endcase
          if (w[15:11] != 0) iss[mach].r[w[15:11]] = res;
          k = K_R;
        end
        6'h0d: begin
          if (w[20:16] != 0) iss[mach].r[w[20:16]] = rs | zimm;
          k = K_ORI;
        end
        6'h23: begin
          if (w[20:16] != 0) iss[mach].r[w[20:16]] = rd_mem(mach, rs + simm);
          k = K_LW;
        end
        6'h2b: begin
          iss[mach].m[int'((rs + simm) >> 2) & 1023] = rt;
          k = K_SW;
        end
        6'h04: begin
          if (rs == rt) begin
            npc = npc + (simm << 2);
            k = K_BEQ_T;
          end else k = K_BEQ_N;
        end
        6'h02: begin
          npc = {npc[31:28], w[25:0], 2'b00};
          k = K_J;
        end
        default: k = K_UNK;
      endcase
    end
    iss[mach].pc = npc;
    return k;
  endfunction

  // ---------------------------------------------------------------- programs
  logic [31:0] prog0 [$] = '{
    ori_(5'd4, 5'd0, 16'h0004),                 // 00 r4 = 4
    ori_(5'd1, 5'd0, 16'h0200),                 // 04 r1 = array pointer
    ori_(5'd2, 5'd0, 16'(32'h200 + 4 * NWORDS)),// 08 r2 = array end
    ori_(5'd3, 5'd0, 16'h0000),                 // 0c r3 = sum
    beq_(5'd1, 5'd2, 16'd5),                    // 10 loop: exit to 28
    lw_ (5'd5, 5'd1, 16'h0000),                 // 14
    add_(5'd3, 5'd3, 5'd5),                     // 18
    add_(5'd1, 5'd1, 5'd4),                     // 1c
    j_  (26'h4),                                // 20 -> 10
    32'h0,                                      // 24
    addi_(5'd9, 5'd0, 16'h0001),                // 28 unknown opcode
    sw_ (5'd3, 5'd0, 16'h0100),                 // 2c M[100] = sum
    slt_(5'd6, 5'd3, 5'd5),                     // 30
    sub_(5'd7, 5'd3, 5'd5),                     // 34
    and_(5'd8, 5'd3, 5'd7),                     // 38
    or_ (5'd9, 5'd8, 5'd6),                     // 3c
    sw_ (5'd9, 5'd2, 16'hfefc),                 // 40 M[r2 - 0x104]
    ori_(5'd10, 5'd9, 16'h8001),                // 44
    beq_(5'd0, 5'd0, 16'hffff)                  // 48 halt loop
  };
  localparam logic [31:0] HALT0 = 32'h48;

  logic [31:0] progb [$];

  int cnt [kind_t];
  int bus_add [4], bus_skip [4];

  function automatic int cycles_of(kind_t k, int mach);
    if (mach == 0) begin
      case (k)
        K_R, K_ORI, K_SW: return 4;
        K_LW:             return 5;
        K_BEQ_T, K_BEQ_N, K_J: return 3;
        default:          return 2;
      endcase
    end
    case (mach)
      1: return (k == K_ADD) ? 6 : 3;
      2: return (k == K_ADD) ? 5 : 3;
      default: return (k == K_ADD) ? 3 : 2;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-machine lockstep monitors
  bit done_m [4];
  int ninstr [4];

  for (genvar g = 0; g < 4; g++) begin : g_mon
    initial begin
      int cyc;
      kind_t k;
      logic [31:0] w, pend;
      bit have_pend;
      cyc = 0;
      have_pend = 0;
      pend = 0;
      wait (rst == 0);
      while (!done_m[g]) begin
        // the word an instruction executed is in IR one cycle after its
        // instr_done pulse (skipped words are still on their way in before)
        if (have_pend) begin
          check(ir[g], pend, $sformatf("machine %0d instruction word", g));
          have_pend = 0;
        end
        cyc++;
        if (instr_done[g]) begin
          w = rd_mem(g, iss[g].pc);
          pend = w;
          have_pend = 1;
          k = step(g, g == 0);
          check(32'(cyc), 32'(cycles_of(k, g)),
                $sformatf("machine %0d cycles of %h (kind %0d)", g, w, k));
          cyc = 0;
          ninstr[g]++;
          if (g == 0) cnt[k] = cnt.exists(k) ? cnt[k] + 1 : 1;
          else if (k == K_ADD) bus_add[g]++;
          else bus_skip[g]++;
          if (g == 0 && iss[0].pc == HALT0 && k == K_BEQ_T && w == prog0[HALT0 / 4]) done_m[g] = 1;
          if (g != 0 && ninstr[g] == NADD + 1) done_m[g] = 1;
        end
        @(negedge clk);
      end
    end
  end

  initial begin
    logic [31:0] v;
    for (int m = 0; m < 4; m++) begin
      host_we[m] = 0; host_addr[m] = 0; host_wdata[m] = 0; dbg_reg[m] = 0;
      iss[m].pc = 0;
      foreach (iss[m].r[i]) iss[m].r[i] = 0;
    end
    // chain of adds for the bus machines, one unknown word after the 5th
    for (int i = 0; i < NADD; i++) begin
      if (i == 5) progb.push_back(addi_(5'd7, 5'd0, 16'h0005));
      progb.push_back(add_(5'(3 + (i % 29)), 5'(1 + (i % 29)), 5'(2 + (i % 29))));
    end
    // load memories
    @(negedge clk);
    foreach (prog0[i]) begin
      host_we[0] = 1; host_addr[0] = 32'(i * 4); host_wdata[0] = prog0[i];
      iss[0].m[i] = prog0[i];
      @(negedge clk);
    end
    // memory starts undefined: clear the result area the bench compares
    for (int a = 'h100; a < 'h200; a += 4) begin
      host_we[0] = 1; host_addr[0] = 32'(a); host_wdata[0] = 0;
      iss[0].m[a >> 2] = 0;
      @(negedge clk);
    end
    for (int i = 0; i < NWORDS; i++) begin
      v = $urandom;
      host_we[0] = 1; host_addr[0] = 32'h200 + 32'(i * 4); host_wdata[0] = v;
      iss[0].m[(32'h200 >> 2) + i] = v;
      @(negedge clk);
    end
    host_we[0] = 0;
    for (int m = 1; m < 4; m++) begin
      foreach (progb[i]) begin
        host_we[m] = 1; host_addr[m] = 32'(i * 4); host_wdata[m] = progb[i];
        iss[m].m[i] = progb[i];
        @(negedge clk);
      end
      host_we[m] = 0;
    end
    rst = 0;
    // seed r1 and r2 of the bus machines (they have no load instruction)
    for (int m = 1; m < 4; m++) begin
      iss[m].r[1] = $urandom; iss[m].r[2] = $urandom;
    end
    dut.u_bus1.u_rf.r[1] = iss[1].r[1]; dut.u_bus1.u_rf.r[2] = iss[1].r[2];
    dut.u_bus2.u_rf.r[1] = iss[2].r[1]; dut.u_bus2.u_rf.r[2] = iss[2].r[2];
    dut.u_bus3.u_rf.r[1] = iss[3].r[1]; dut.u_bus3.u_rf.r[2] = iss[3].r[2];

    wait (done_m[0] && done_m[1] && done_m[2] && done_m[3]);
    @(negedge clk);

    // final state against the model
    for (int m = 0; m < 4; m++) begin
      for (int r = 0; r < 32; r++) begin
        dbg_reg[m] = 5'(r);
        #1 check(dbg_data[m], iss[m].r[r], $sformatf("machine %0d register r%0d", m, r));
      end
    end
    for (int a = 'h100; a < 'h200 + 4 * NWORDS; a += 4) begin
      host_addr[0] = 32'(a);
      #1 check(host_rdata[0], rd_mem(0, 32'(a)), $sformatf("machine 0 M[%h]", a));
    end

    // every mechanism must have happened
    for (int k = K_R; k <= K_UNK; k++) begin
      kind_t kk;
      int c;
      kk = kind_t'(k);
      c = cnt.exists(kk) ? cnt[kk] : 0;
      $display("machine 0: %s happened %0d times", kk.name(), c);
      checks++;
      if (c == 0) begin
        failures++;
        $display("FAIL machine 0: %s never happened", kk.name());
      end
    end
    for (int m = 1; m < 4; m++) begin
      $display("machine %0d: add %0d times, skipped word %0d times", m, bus_add[m], bus_skip[m]);
      checks += 2;
      if (bus_add[m] == 0)  begin failures++; $display("FAIL machine %0d: no add", m); end
      if (bus_skip[m] == 0) begin failures++; $display("FAIL machine %0d: no skipped word", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
