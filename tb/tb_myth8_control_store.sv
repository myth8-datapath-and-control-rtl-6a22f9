// tb_myth8_control_store: checks the contents of the MYTH8 control store.
//
// Checks the control word is 30 wires wide, then reads back the lines of the fetch cycle and
// of each opcode's control program and compares the fields that matter with the programs as
// the design writes them: which registers are selected and written, the ALU function and
// carry-in, MAR/MDR/result selects, read/write, IR loads and the branch (condition, both
// targets, indexed jump). Also checks that the opcode bases sit at 5 + opcode and that every
// unused line and unused opcode base goes back to fetch0 without side effects.
module tb_myth8_control_store;
  import myth8_pkg::*;

  uaddr_t      upc;
  uinstr_t     uinstr;
  ctrl_t       c;
  branch_t     br;
  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  myth8_control_store dut (.upc, .uinstr);

  assign c  = uinstr.ctrl;
  assign br = uinstr.br;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL upc %0d: %s", upc, what);
    end
  endtask

  task automatic at(int a);
    upc = uaddr_t'(a);
    #1;
  endtask

  function automatic bit goes_to(int target);
    return br.cond == C_TRUE && br.addr_true == uaddr_t'(target) && !br.index_sel;
  endfunction

  initial begin
    expect_true($bits(ctrl_t) == 30, "control word is not 30 wires");

    // fetch0 / fetch2: r6 <- r7 AND r7, MAR <- same
    for (int a = 0; a <= 2; a += 2) begin
      at(a);
      expect_true(c.a_sel == 7 && c.b_sel == 7 && c.alu_sel == ALU_AND && c.r_write == 8'h40 &&
                  c.mar_sel == MAR_LOAD && !c.read && goes_to(a + 1), "fetch0/2");
    end
    // fetch1 / fetch3: r7 <- r6 + 1, read, IR half load, loop on wait
    at(1);
    expect_true(c.a_sel == 6 && c.alu_sel == ALU_ADDA && c.c_in && c.r_write == 8'h80 && c.read &&
                c.ir0_sel == IRB_LOAD && c.ir1_sel == IRB_HOLD && c.result_sel == RES_ALU, "fetch1");
    expect_true(br.cond == C_WAIT && br.addr_true == 1 && br.addr_false == 2, "fetch1 branch");
    at(3);
    expect_true(c.a_sel == 6 && c.alu_sel == ALU_ADDA && c.c_in && c.r_write == 8'h80 && c.read &&
                c.ir1_sel == IRB_LOAD && c.ir0_sel == IRB_HOLD, "fetch3");
    expect_true(br.cond == C_WAIT && br.addr_true == 3 && br.addr_false == 4, "fetch3 branch");
    at(4);
    expect_true(c == CTRL_IDLE && br.index_sel && br.cond == C_TRUE && br.addr_true == 5,
                "fetch4 indexed jump");

    at(5 + 0);  // noop
    expect_true(c == CTRL_IDLE && goes_to(0), "noop");
    at(5 + 1);  // add
    expect_true(c.ri_sel && c.rj_sel && c.rk_sel && c.alu_sel == ALU_ADD && !c.c_in &&
                c.result_sel == RES_ALU && goes_to(0), "add");
    at(5 + 2);  // const8
    expect_true(c.ri_sel && c.result_sel == RES_IR_CONST8 && c.r_write == 0 && goes_to(0), "const8");
    at(5 + 3);  // bzero
    expect_true(c.rj_sel && c.alu_sel == ALU_SUBA && !c.c_in && c.r_write == 8'h40 && !c.ri_sel &&
                c.result_sel == RES_IR_CONST4 && br.cond == C_COUT && br.addr_true == 0 &&
                br.addr_false == 69, "bzero");
    at(69);     // branch: r7 <- r7 + r6
    expect_true(c.a_sel == 7 && c.b_sel == 6 && c.alu_sel == ALU_ADD && c.r_write == 8'h80 &&
                !c.c_in && goes_to(0), "branch");
    at(5 + 4);  // move
    expect_true(c.ri_sel && c.rj_sel && !c.rk_sel && c.alu_sel == ALU_ADDA && !c.c_in && goes_to(0),
                "move");
    // store: r4 <- 0; MAR <- rj; MDR <- r4 | rk; write until done
    at(5 + 5);
    expect_true(c.a_sel == 4 && c.b_sel == 4 && c.alu_sel == ALU_XOR && c.r_write == 8'h10 &&
                goes_to(70), "store 0");
    at(70);
    expect_true(c.rj_sel && c.alu_sel == ALU_ADDA && c.mar_sel == MAR_LOAD && c.r_write == 0 &&
                goes_to(71), "store 1");
    at(71);
    expect_true(c.a_sel == 4 && c.rk_sel && c.alu_sel == ALU_OR && c.mdr_sel == MDR_LOAD_ALU &&
                c.r_write == 0 && goes_to(72), "store 2");
    at(72);
    expect_true(c.write && !c.read && br.cond == C_WAIT && br.addr_true == 72 && br.addr_false == 0,
                "store 3");
    // load: MAR <- rj; read into MDR until done; ri <- MDR
    at(5 + 6);
    expect_true(c.rj_sel && c.alu_sel == ALU_ADDA && c.mar_sel == MAR_LOAD && c.r_write == 0 &&
                goes_to(73), "load 0");
    at(73);
    expect_true(c.read && c.mdr_sel == MDR_LOAD_MEM && br.cond == C_WAIT && br.addr_true == 73 &&
                br.addr_false == 74, "load 1");
    at(74);
    expect_true(c.result_sel == RES_MDR && c.ri_sel && goes_to(0), "load 2");

    for (int a = 5 + 7; a < 128; a++) begin
      if (a >= 69 && a <= 74) continue;
      at(a);
      expect_true(c == CTRL_IDLE && goes_to(0), "unused line");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
