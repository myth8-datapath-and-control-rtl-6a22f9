// tb_myth8_datapath: runs hand-written control programs on the MYTH8 datapath.
//
// The testbench plays the control unit: it applies one control word per clock cycle and
// reads registers back by copying them into MAR (a_sel = b_sel = r, AND, mar_sel = LOAD).
// Programs exercised:
//   * the multi-write example: r0 and r5 <- r1 + r2 in one cycle;
//   * circular left shift: AND a register with itself, branch on m7, then ADD it to itself
//     with c_in = m7; repeated 8 times it must return the original value;
//   * right shift by k: circular shift by 8 - k, then AND with a mask of 8 - k ones;
//   * MDR loaded from memory and moved into a register; MDR loaded from the ALU (store data);
//   * IR fields driving the register selects (ri <- rj + rk) and the two literals;
//   * the signed comparison rules on SUB status: a < b is s XOR v, a = b is z,
//     a > b is not z and s = v, for random operand pairs;
//   * the blt rj, rk, rel_addr program (branch iff m7 XOR v), the testbench taking the
//     branches the way the sequencer would.
module tb_myth8_datapath;
  import myth8_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n;
  ctrl_t        ctrl;
  word_t        mem_rdata, mem_addr, mem_wdata;
  alu_status_t  status;
  ir_fields_t   ir;
  int unsigned  checks = 0, failures = 0;

  always #5 clk = ~clk;

  myth8_datapath dut (.clk, .rst_n, .ctrl, .mem_rdata, .mem_addr, .mem_wdata, .status, .ir);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one control word for one clock cycle (status is valid during the cycle).
  task automatic cycle(ctrl_t c);
    @(negedge clk);
    ctrl = c;
    #1;
  endtask

  task automatic finish_cycle();
    @(posedge clk);
    @(negedge clk);
    ctrl = CTRL_IDLE;
  endtask

  task automatic set_reg(int r, word_t v);
    ctrl_t c;
    mem_rdata = v;
    c = CTRL_IDLE; c.ir1_sel = IRB_LOAD;
    cycle(c); finish_cycle();
    c = CTRL_IDLE; c.result_sel = RES_IR_CONST8; c.r_write[r] = 1'b1;
    cycle(c); finish_cycle();
  endtask

  task automatic get_reg(int r, output word_t v);
    ctrl_t c;
    c = CTRL_IDLE; c.a_sel = rsel_t'(r); c.b_sel = rsel_t'(r); c.alu_sel = ALU_AND;
    c.mar_sel = MAR_LOAD;
    cycle(c); finish_cycle();
    v = mem_addr;
  endtask

  task automatic expect_reg(int r, word_t v, string what);
    word_t got;
    get_reg(r, got);
    checks++;
    if (got !== v) begin
      failures++;
      $display("FAIL %s: r%0d = %02h, expected %02h", what, r, got, v);
    end
  endtask

  task automatic shift_left_circular(int r);
    ctrl_t c;
    logic  m7;
    c = CTRL_IDLE; c.a_sel = rsel_t'(r); c.b_sel = rsel_t'(r); c.alu_sel = ALU_AND;
    cycle(c);
    m7 = status.m7;            // if m7 then goto shift1 else goto shift0
    finish_cycle();
    c = CTRL_IDLE; c.a_sel = rsel_t'(r); c.b_sel = rsel_t'(r); c.alu_sel = ALU_ADD;
    c.r_write[r] = 1'b1; c.c_in = m7;
    cycle(c); finish_cycle();
  endtask

  initial begin
    ctrl_t c;
    word_t v, x, y, orig;
    logic  lt, gt, eq;
    rst_n = 1'b0; ctrl = CTRL_IDLE; mem_rdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 8; r++) expect_reg(r, 8'h00, "reset");

    // multi-write example: r0_write, r5_write, a_sel = 1, b_sel = 2, alu_sel = ADD
    set_reg(1, 8'h23); set_reg(2, 8'h14); set_reg(0, 8'hEE); set_reg(5, 8'hEE);
    c = CTRL_IDLE; c.r_write[0] = 1'b1; c.r_write[5] = 1'b1; c.a_sel = 3'd1; c.b_sel = 3'd2;
    c.alu_sel = ALU_ADD;
    cycle(c); finish_cycle();
    expect_reg(0, 8'h37, "multi-write r0");
    expect_reg(5, 8'h37, "multi-write r5");
    expect_reg(1, 8'h23, "unwritten r1");

    // circular shift left
    for (int k = 0; k < 20; k++) begin
      orig = word_t'($urandom);
      set_reg(3, orig);
      shift_left_circular(3);
      expect_reg(3, {orig[6:0], orig[7]}, "circular shift left");
      for (int s = 0; s < 7; s++) shift_left_circular(3);
      expect_reg(3, orig, "eight circular shifts");
    end

    // right shift by k: circular shift left by 8 - k, then AND with the mask in r4
    for (int k = 1; k < 8; k++) begin
      orig = word_t'($urandom);
      set_reg(3, orig);
      for (int s = 0; s < 8 - k; s++) shift_left_circular(3);
      set_reg(4, 8'hFF >> k);
      c = CTRL_IDLE; c.a_sel = 3'd3; c.b_sel = 3'd4; c.alu_sel = ALU_AND; c.r_write[3] = 1'b1;
      cycle(c); finish_cycle();
      expect_reg(3, orig >> k, "right shift");
    end

    // load path: MDR <- memory, then ri <- MDR; MDR holds when not selected
    mem_rdata = 8'hA5;
    c = CTRL_IDLE; c.read = 1'b1; c.mdr_sel = MDR_LOAD_MEM;
    cycle(c); finish_cycle();
    mem_rdata = 8'h00;
    c = CTRL_IDLE; c.result_sel = RES_MDR; c.r_write[2] = 1'b1;
    cycle(c); finish_cycle();
    expect_reg(2, 8'hA5, "register from MDR");
    checks++; if (mem_wdata !== 8'hA5) begin failures++; $display("FAIL MDR did not hold"); end

    // store data path: MDR <- ALU
    set_reg(1, 8'h5C);
    c = CTRL_IDLE; c.a_sel = 3'd1; c.alu_sel = ALU_ADDA; c.mdr_sel = MDR_LOAD_ALU;
    cycle(c); finish_cycle();
    checks++; if (mem_wdata !== 8'h5C) begin failures++; $display("FAIL MDR from ALU"); end

    // IR fields: opcode 1, ri = 2, rj = 1, rk = 3, const4 = -3
    set_reg(1, 8'd40); set_reg(3, 8'd2);
    mem_rdata = {OP_ADD, 2'd2};
    c = CTRL_IDLE; c.ir0_sel = IRB_LOAD; cycle(c); finish_cycle();
    mem_rdata = {2'd1, 2'd3, 4'hD};
    c = CTRL_IDLE; c.ir1_sel = IRB_LOAD; cycle(c); finish_cycle();
    checks++; if (ir.opcode !== OP_ADD || ir.ri !== 2'd2) begin failures++; $display("FAIL IR fields"); end
    c = CTRL_IDLE; c.ri_sel = 1'b1; c.rj_sel = 1'b1; c.rk_sel = 1'b1; c.alu_sel = ALU_ADD;
    cycle(c); finish_cycle();
    expect_reg(2, 8'd42, "ri <- rj + rk from IR fields");
    c = CTRL_IDLE; c.result_sel = RES_IR_CONST4; c.r_write[6] = 1'b1;
    cycle(c); finish_cycle();
    expect_reg(6, 8'hFD, "sign-extended const4");
    c = CTRL_IDLE; c.result_sel = RES_IR_CONST8; c.ri_sel = 1'b1;
    cycle(c); finish_cycle();
    expect_reg(2, 8'h7D, "const8 into ri");

    // signed comparisons from SUB status
    for (int k = 0; k < 300; k++) begin
      x = word_t'($urandom);
      y = (k % 5 == 0) ? x : word_t'($urandom);
      if (k == 1) begin x = 8'h7F; y = 8'h80; end
      if (k == 2) begin x = 8'h80; y = 8'h7F; end
      set_reg(0, x); set_reg(1, y);
      c = CTRL_IDLE; c.a_sel = 3'd0; c.b_sel = 3'd1; c.alu_sel = ALU_SUB; c.c_in = 1'b1;
      cycle(c);
      lt = status.m7 ^ status.v;
      eq = status.z;
      gt = !status.z && (status.m7 == status.v);
      finish_cycle();
      checks++;
      if (lt !== ($signed(x) < $signed(y)) || eq !== (x == y) || gt !== ($signed(x) > $signed(y))) begin
        failures++;
        if (failures < 10) $display("FAIL compare %02h %02h: lt=%0b eq=%0b gt=%0b", x, y, lt, eq, gt);
      end
    end

    // blt rj, rk, rel_addr control program, with this testbench choosing the branches:
    //   SUB rj - rk, if m7 goto neg else goto pos;
    //   neg: SUB again, if v goto fetch else goto branchlt;
    //   pos: SUB again, if v goto branchlt else goto fetch;
    //   branchlt: r6 <- const4; r7 <- r7 + r6.
    for (int k = 0; k < 200; k++) begin
      word_t pc, exp_pc;
      logic  m7, take;
      logic [3:0] off;
      x   = word_t'($urandom);
      y   = (k % 7 == 0) ? x : word_t'($urandom);
      if (k == 0) begin x = 8'h80; y = 8'h01; end   // overflow, a < b
      if (k == 1) begin x = 8'h7F; y = 8'hFF; end   // overflow, a > b
      pc  = word_t'($urandom);
      off = 4'($urandom);
      set_reg(1, x); set_reg(2, y); set_reg(7, pc);
      mem_rdata = {6'd0, 2'd0};
      c = CTRL_IDLE; c.ir0_sel = IRB_LOAD; cycle(c); finish_cycle();
      mem_rdata = {2'd1, 2'd2, off};
      c = CTRL_IDLE; c.ir1_sel = IRB_LOAD; cycle(c); finish_cycle();
      c = CTRL_IDLE; c.rj_sel = 1'b1; c.rk_sel = 1'b1; c.alu_sel = ALU_SUB; c.c_in = 1'b1;
      cycle(c); m7 = status.m7; finish_cycle();
      cycle(c); take = m7 ? !status.v : status.v; finish_cycle();
      if (take) begin
        c = CTRL_IDLE; c.result_sel = RES_IR_CONST4; c.r_write[6] = 1'b1;
        cycle(c); finish_cycle();
        c = CTRL_IDLE; c.a_sel = 3'd7; c.b_sel = 3'd6; c.alu_sel = ALU_ADD; c.r_write[7] = 1'b1;
        cycle(c); finish_cycle();
      end
      exp_pc = ($signed(x) < $signed(y)) ? pc + {{4{off[3]}}, off} : pc;
      expect_reg(7, exp_pc, "blt target");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
