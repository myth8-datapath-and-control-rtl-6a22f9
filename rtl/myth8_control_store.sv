// myth8_control_store: the control-store ROM of the MYTH8 control unit, holding the fetch
// cycle and the control programs of the tiny instruction set.
//
// The ROM is read combinationally: uinstr is the micro-instruction at address upc, i.e. the
// 30 control wires of the current cycle plus the branch that chooses the next address.
// Layout, as the design places it: fetch0..fetch4 at 0..4, one base line per opcode at
// 5..68 (5 + opcode), further lines of the longer programs from 69 on.
//
//   fetch0  r6 <- r7, MAR <- r7                       (AND of r7 with itself)
//   fetch1  r7 <- r6 + 1, read, IR0 <- mem            loop while wait
//   fetch2  r6 <- r7, MAR <- r7
//   fetch3  r7 <- r6 + 1, read, IR1 <- mem            loop while wait
//   fetch4  goto 5 + opcode
//   op 0 noop    goto fetch0
//   op 1 add     ri <- rj + rk
//   op 2 const8  ri <- const8                         (result_sel = IR_CONST8)
//   op 3 bzero   r6 <- const4, ALU: rj - 1            c_out = 0 exactly when rj = 0;
//                if c_out goto fetch0 else branch;  branch: r7 <- r7 + r6
//   op 4 move    ri <- rj + 0                         (ADDA, c_in = 0)
//   op 5 store   MAR <- rj; MDR <- rk; write until not wait
//   op 6 load    MAR <- rj; read, MDR <- mem until not wait; ri <- MDR
// Opcodes 7..63 have no program and behave as noop. Since r7 has already advanced by 2 when
// bzero executes, its target is (address of bzero) + 2 + const4.
// The fetch, load, bzero, const8, add and move programs follow the design. The store program
// is this design's: no ALU function passes the b bus through, and rk can reach only the b bus,
// so the temporary r4 is first cleared (r4 XOR r4) and MDR is loaded with r4 OR rk.
module myth8_control_store
  import myth8_pkg::*;
(
  input  uaddr_t   upc,
  output uinstr_t  uinstr
);

  // Labels of the lines placed after the opcode bases.
  localparam uaddr_t L_BRANCH = UADDR_EXTRA;          // 69
  localparam uaddr_t L_ST1    = UADDR_EXTRA + 7'd1;   // 70
  localparam uaddr_t L_ST2    = UADDR_EXTRA + 7'd2;   // 71
  localparam uaddr_t L_ST3    = UADDR_EXTRA + 7'd3;   // 72
  localparam uaddr_t L_LD1    = UADDR_EXTRA + 7'd4;   // 73
  localparam uaddr_t L_LD2    = UADDR_EXTRA + 7'd5;   // 74

  localparam uaddr_t L_FETCH1 = 7'd1;
  localparam uaddr_t L_FETCH2 = 7'd2;
  localparam uaddr_t L_FETCH3 = 7'd3;
  localparam uaddr_t L_FETCH4 = 7'd4;

  function automatic branch_t go(uaddr_t target);
    return '{cond: C_TRUE, addr_true: target, addr_false: target, index_sel: 1'b0};
  endfunction

  function automatic branch_t if_go(cond_e cond, uaddr_t t, uaddr_t f);
    return '{cond: cond, addr_true: t, addr_false: f, index_sel: 1'b0};
  endfunction

  function automatic uinstr_t microcode(uaddr_t addr);
    ctrl_t   c;
    branch_t br;
    c  = CTRL_IDLE;
    br = go(UADDR_FETCH0);
    unique case (addr)
      // ---------------- fetch ----------------
      7'd0: begin  // fetch0
        c.a_sel = 3'd7; c.b_sel = 3'd7; c.alu_sel = ALU_AND;
        c.r_write[6] = 1'b1; c.mar_sel = MAR_LOAD;
        br = go(L_FETCH1);
      end
      L_FETCH1: begin
        c.r_write[7] = 1'b1; c.a_sel = 3'd6; c.alu_sel = ALU_ADDA; c.c_in = 1'b1;
        c.read = 1'b1; c.ir0_sel = IRB_LOAD;
        br = if_go(C_WAIT, L_FETCH1, L_FETCH2);
      end
      L_FETCH2: begin
        c.a_sel = 3'd7; c.b_sel = 3'd7; c.alu_sel = ALU_AND;
        c.r_write[6] = 1'b1; c.mar_sel = MAR_LOAD;
        br = go(L_FETCH3);
      end
      L_FETCH3: begin
        c.r_write[7] = 1'b1; c.a_sel = 3'd6; c.alu_sel = ALU_ADDA; c.c_in = 1'b1;
        c.read = 1'b1; c.ir1_sel = IRB_LOAD;
        br = if_go(C_WAIT, L_FETCH3, L_FETCH4);
      end
      L_FETCH4: begin
        br = go(UADDR_OPBASE);
        br.index_sel = 1'b1;
      end
      // ---------------- opcode bases (5 + opcode) ----------------
      UADDR_OPBASE + 7'(OP_NOOP): ;
      UADDR_OPBASE + 7'(OP_ADD): begin
        c.ri_sel = 1'b1; c.rj_sel = 1'b1; c.rk_sel = 1'b1; c.alu_sel = ALU_ADD;
      end
      UADDR_OPBASE + 7'(OP_CONST8): begin
        c.result_sel = RES_IR_CONST8; c.ri_sel = 1'b1;
      end
      UADDR_OPBASE + 7'(OP_BZERO): begin
        c.rj_sel = 1'b1; c.alu_sel = ALU_SUBA; c.r_write[6] = 1'b1;
        c.result_sel = RES_IR_CONST4;
        br = if_go(C_COUT, UADDR_FETCH0, L_BRANCH);
      end
      UADDR_OPBASE + 7'(OP_MOVE): begin
        c.ri_sel = 1'b1; c.rj_sel = 1'b1; c.alu_sel = ALU_ADDA;
      end
      UADDR_OPBASE + 7'(OP_STORE): begin
        c.a_sel = 3'd4; c.b_sel = 3'd4; c.alu_sel = ALU_XOR; c.r_write[4] = 1'b1;
        br = go(L_ST1);
      end
      UADDR_OPBASE + 7'(OP_LOAD): begin
        c.rj_sel = 1'b1; c.alu_sel = ALU_ADDA; c.mar_sel = MAR_LOAD;
        br = go(L_LD1);
      end
      // ---------------- continuation lines ----------------
      L_BRANCH: begin
        c.r_write[7] = 1'b1; c.a_sel = 3'd7; c.b_sel = 3'd6; c.alu_sel = ALU_ADD;
      end
      L_ST1: begin
        c.rj_sel = 1'b1; c.alu_sel = ALU_ADDA; c.mar_sel = MAR_LOAD;
        br = go(L_ST2);
      end
      L_ST2: begin
        c.a_sel = 3'd4; c.rk_sel = 1'b1; c.alu_sel = ALU_OR; c.mdr_sel = MDR_LOAD_ALU;
        br = go(L_ST3);
      end
      L_ST3: begin
        c.write = 1'b1;
        br = if_go(C_WAIT, L_ST3, UADDR_FETCH0);
      end
      L_LD1: begin
        c.read = 1'b1; c.mdr_sel = MDR_LOAD_MEM;
        br = if_go(C_WAIT, L_LD1, L_LD2);
      end
      L_LD2: begin
        c.result_sel = RES_MDR; c.ri_sel = 1'b1;
      end
      default: ;   // unused opcodes and lines: goto fetch0
    endcase
    return '{ctrl: c, br: br};
  endfunction

  assign uinstr = microcode(upc);

endmodule
