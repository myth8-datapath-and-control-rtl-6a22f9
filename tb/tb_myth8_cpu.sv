// tb_myth8_cpu: end-to-end test of the MYTH8 CPU with a memory that inserts wait cycles.
//
// An instruction-level reference model of the tiny instruction set runs next to the CPU.
// Each time the CPU's micro-program counter returns to fetch0 one instruction has finished:
// the testbench then compares r0..r3 and the program counter r7 with the model, checks the
// cycles the instruction took (5 fetch cycles + its execute cycles + the memory's wait
// cycles), and steps the model. Phase 1 runs a hand-written program (sum of 5..1 in a bzero
// loop, then store, load, move, add, noop, an unused opcode and a self-loop) and checks the
// stored results. Phase 2 fills memory with random instructions (opcodes 0..7) and runs
// N_PROGRAMS such programs from reset, RANDOM_INSNS instructions each, comparing state after
// every instruction and the whole memory at the end of each program.
// It counts how often each mechanism happens (every opcode, bzero taken and not taken, a
// negative branch offset, memory wait stalls on fetch, load and store) and fails any that
// never happened. The CPU runs with all parameters at their defaults.
module tb_myth8_cpu;
  import myth8_pkg::*;

  localparam int unsigned RANDOM_INSNS = 150;
  localparam int unsigned N_PROGRAMS   = 40;
  localparam int unsigned WATCHDOG     = 200000;

  logic       clk = 1'b0;
  logic       rst_n;
  word_t      mem_addr, mem_wdata, mem_rdata;
  logic       mem_read, mem_write, mem_wait;
  uaddr_t     upc;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  myth8_cpu dut (
    .clk, .rst_n, .mem_addr, .mem_wdata, .mem_rdata, .mem_read, .mem_write, .mem_wait, .upc
  );

  myth8_mem_model #(.MAX_WAIT(3)) u_mem (
    .clk, .rst_n, .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata),
    .read(mem_read), .write(mem_write), .mem_wait(mem_wait)
  );

  // ---------------- reference model ----------------
  logic [7:0] rmem [256];
  logic [7:0] rreg [8];

  // mechanism counters
  int unsigned n_op [8];
  int unsigned n_taken, n_not_taken, n_neg_offset;
  int unsigned n_fetch_stall, n_load_stall, n_store_stall;

  function automatic logic [15:0] enc1(logic [5:0] op, logic [1:0] ri, logic [1:0] rj,
                                       logic [1:0] rk, logic [3:0] c4);
    return {op, ri, rj, rk, c4};
  endfunction

  function automatic logic [15:0] enc2(logic [5:0] op, logic [1:0] ri, logic [7:0] c8);
    return {op, ri, c8};
  endfunction

  // Executes one instruction on the model; returns its expected cycle count without waits.
  function automatic int unsigned ref_step();
    logic [7:0] i0, i1, pc;
    logic [5:0] op;
    logic [2:0] ri, rj, rk;
    int unsigned cyc;
    pc = rreg[7];
    i0 = rmem[pc];
    i1 = rmem[8'(pc + 8'd1)];
    rreg[7] = pc + 8'd2;
    op = i0[7:2];
    ri = {1'b0, i0[1:0]};
    rj = {1'b0, i1[7:6]};
    rk = {1'b0, i1[5:4]};
    cyc = 6;
    n_op[op < 7 ? op : 7]++;
    case (op)
      OP_ADD:    rreg[ri] = rreg[rj] + rreg[rk];
      OP_CONST8: rreg[ri] = i1;
      OP_BZERO: begin
        if (rreg[rj] == 8'd0) begin
          rreg[7] = rreg[7] + {{4{i1[3]}}, i1[3:0]};
          cyc = 7;
          n_taken++;
          if (i1[3]) n_neg_offset++;
        end else begin
          n_not_taken++;
        end
      end
      OP_MOVE:   rreg[ri] = rreg[rj];
      OP_STORE: begin rmem[rreg[rj]] = rreg[rk]; cyc = 9; end
      OP_LOAD:  begin rreg[ri] = rmem[rreg[rj]]; cyc = 8; end
      default: ;
    endcase
    return cyc;
  endfunction

  // ---------------- instruction-boundary checker ----------------
  bit          running = 1'b0;
  bit          done;
  int unsigned insns, target, expect_cyc, cyc_count, wait_count;

  task automatic compare_state();
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (dut.u_datapath.u_regfile.regs[j] !== rreg[j]) begin
        failures++;
        if (failures < 10)
          $display("FAIL insn %0d: r%0d = %02h, expected %02h", insns, j,
                   dut.u_datapath.u_regfile.regs[j], rreg[j]);
      end
    end
    checks++;
    if (dut.u_datapath.u_regfile.regs[7] !== rreg[7]) begin
      failures++;
      if (failures < 10)
        $display("FAIL insn %0d: pc = %02h, expected %02h", insns,
                 dut.u_datapath.u_regfile.regs[7], rreg[7]);
    end
  endtask

  always @(posedge clk) begin
    if (running && rst_n) begin
      cyc_count++;
      if ((mem_read || mem_write) && mem_wait) begin
        wait_count++;
        if (upc inside {7'd1, 7'd3}) n_fetch_stall++;
        else if (mem_read)           n_load_stall++;
        else                         n_store_stall++;
      end
      if (upc == UADDR_FETCH0) begin
        if (insns > 0) begin
          checks++;
          if (cyc_count - 1 != expect_cyc + wait_count) begin
            failures++;
            if (failures < 10)
              $display("FAIL insn %0d: %0d cycles, expected %0d", insns, cyc_count - 1,
                       expect_cyc + wait_count);
          end
        end
        compare_state();
        cyc_count  = 1;
        wait_count = 0;
        if (insns < target) begin
          expect_cyc = ref_step();
          insns++;
        end else begin
          done = 1'b1;
        end
      end
    end
  end

  task automatic run_insns(int unsigned n);
    target  = n;
    done    = 1'b0;
    running = 1'b1;
    while (!done) @(posedge clk);
    @(negedge clk);
    running = 1'b0;
  endtask

  task automatic reset_cpu();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int j = 0; j < 8; j++) rreg[j] = 8'd0;
    insns = 0;
    rst_n = 1'b1;
  endtask

  task automatic put(logic [7:0] addr, logic [15:0] insn);
    u_mem.mem[addr]     = insn[15:8];
    u_mem.mem[8'(addr + 8'd1)] = insn[7:0];
  endtask

  task automatic check_mem(logic [7:0] addr, logic [7:0] expected, string what);
    checks++;
    if (u_mem.mem[addr] !== expected) begin
      failures++;
      $display("FAIL %s: mem[%02h] = %02h, expected %02h", what, addr, u_mem.mem[addr], expected);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    for (int j = 0; j < 8; j++) n_op[j] = 0;
    {n_taken, n_not_taken, n_neg_offset} = '0;
    {n_fetch_stall, n_load_stall, n_store_stall} = '0;

    // ---------------- phase 1: directed program ----------------
    for (int a = 0; a < 256; a++) u_mem.mem[a] = 8'h00;
    put( 0, enc2(OP_CONST8, 0, 8'd5));            // r0 <- 5
    put( 2, enc2(OP_CONST8, 1, 8'd0));            // r1 <- 0
    put( 4, enc2(OP_CONST8, 2, 8'hFF));           // r2 <- -1
    put( 6, enc2(OP_CONST8, 3, 8'd0));            // r3 <- 0
    put( 8, enc1(OP_BZERO, 0, 0, 0, 4'd6));       // loop: if r0 == 0 goto 16
    put(10, enc1(OP_ADD,   1, 1, 0, 4'd0));       // r1 <- r1 + r0
    put(12, enc1(OP_ADD,   0, 0, 2, 4'd0));       // r0 <- r0 - 1
    put(14, enc1(OP_BZERO, 0, 3, 0, 4'h8));       // goto loop: 14 + 2 - 8 (r3 == 0)
    put(16, enc2(OP_CONST8, 2, 8'h80));           // r2 <- 0x80
    put(18, enc1(OP_STORE, 0, 2, 1, 4'd0));       // Mem[r2] <- r1
    put(20, enc1(OP_LOAD,  3, 2, 0, 4'd0));       // r3 <- Mem[r2]
    put(22, enc1(OP_MOVE,  0, 3, 0, 4'd0));       // r0 <- r3
    put(24, enc1(OP_ADD,   0, 0, 0, 4'd0));       // r0 <- r0 + r0
    put(26, enc1(OP_NOOP,  0, 0, 0, 4'd0));       // noop
    put(28, enc1(6'd7,     2, 2, 2, 4'hF));       // unused opcode: no effect
    put(30, enc2(OP_CONST8, 2, 8'h81));           // r2 <- 0x81
    put(32, enc1(OP_STORE, 0, 2, 0, 4'd0));       // Mem[r2] <- r0
    put(34, enc2(OP_CONST8, 1, 8'd0));            // r1 <- 0
    put(36, enc1(OP_BZERO, 0, 1, 0, 4'hE));       // self-loop: goto 36
    for (int a = 0; a < 256; a++) rmem[a] = u_mem.mem[a];

    reset_cpu();
    run_insns(4 + 5 * 4 + 1 + 10 + 5);
    check_mem(8'h80, 8'd15, "sum 5..1");
    check_mem(8'h81, 8'd30, "doubled sum");
    checks++;
    if (rreg[7] != 8'd36) begin
      failures++;
      $display("FAIL program did not reach its final loop, pc = %02h", rreg[7]);
    end

    // ---------------- phase 2: random programs ----------------
    // Each program: even bytes hold opcode 0..7 and a random ri, odd bytes random fields or
    // literal. Several short programs, each from reset, so that no single tight loop
    // dominates the run.
    for (int p = 0; p < N_PROGRAMS; p++) begin
      for (int a = 0; a < 256; a++) u_mem.mem[a] = 8'($urandom);
      for (int a = 0; a < 256; a += 2) u_mem.mem[a] = {3'b000, 3'($urandom), 2'($urandom)};
      for (int a = 0; a < 256; a++) rmem[a] = u_mem.mem[a];
      reset_cpu();
      run_insns(RANDOM_INSNS);
      for (int a = 0; a < 256; a++) begin
        checks++;
        if (u_mem.mem[a] !== rmem[a]) begin
          failures++;
          if (failures < 10)
            $display("FAIL program %0d: memory[%02h] = %02h, expected %02h", p, a, u_mem.mem[a], rmem[a]);
        end
      end
    end

    // ---------------- mechanism coverage ----------------
    $display("opcodes executed: noop %0d add %0d const8 %0d bzero %0d move %0d store %0d load %0d unused %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("bzero taken %0d (negative offset %0d), not taken %0d", n_taken, n_neg_offset, n_not_taken);
    $display("wait stalls: fetch %0d load %0d store %0d", n_fetch_stall, n_load_stall, n_store_stall);
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (n_op[j] == 0) begin failures++; $display("FAIL opcode class %0d never executed", j); end
    end
    checks++; if (n_taken == 0)       begin failures++; $display("FAIL no bzero taken"); end
    checks++; if (n_not_taken == 0)   begin failures++; $display("FAIL no bzero not taken"); end
    checks++; if (n_neg_offset == 0)  begin failures++; $display("FAIL no negative branch"); end
    checks++; if (n_fetch_stall == 0) begin failures++; $display("FAIL no fetch stall"); end
    checks++; if (n_load_stall == 0)  begin failures++; $display("FAIL no load stall"); end
    checks++; if (n_store_stall == 0) begin failures++; $display("FAIL no store stall"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
