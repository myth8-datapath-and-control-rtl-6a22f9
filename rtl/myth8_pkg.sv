// myth8_pkg: types and constants shared by the MYTH8 datapath and control unit.
//
// MYTH8 is an 8-bit, microprogrammed teaching CPU. One control word of 30 wires drives the
// datapath for one clock cycle; a micro-instruction adds the branch fields the sequencer uses
// to pick the next control-store address. This package holds:
//   * the widths of the machine (8-bit data, 8 registers, 16-bit instructions, 6-bit opcode),
//   * enumerations for the multi-wire control fields (alu_sel, mar_sel, mdr_sel, result_sel)
//     and for the branch condition,
//   * the control word and micro-instruction structs, and the status bundle,
//   * the instruction-register field layout and the opcodes of the tiny instruction set.
// Field widths of the control word follow the design's signal summary (3+3+8+3+1+1+2+2+1+1
// plus ir0_sel, ir1_sel, ri_sel, rj_sel, rk_sel = 30 wires). The numeric codes of the ALU
// functions other than ADD (100b), the result_sel codes of the two IR constants, the branch
// condition codes, and the bit positions of the IR fields are this design's own choices.
package myth8_pkg;

  localparam int unsigned DW       = 8;   // data path width
  localparam int unsigned NREGS    = 8;   // r0..r7
  localparam int unsigned RSELW    = 3;   // register select width
  localparam int unsigned OPW      = 6;   // opcode width (64 opcodes)
  localparam int unsigned UADDRW   = 7;   // control-store address width

  // Control-store placement: fetch at 0..4, opcode bases at 5..68, the rest from 69 on.
  localparam logic [UADDRW-1:0] UADDR_FETCH0  = 7'd0;
  localparam logic [UADDRW-1:0] UADDR_OPBASE  = 7'd5;
  localparam logic [UADDRW-1:0] UADDR_EXTRA   = 7'd69;

  typedef logic [DW-1:0]    word_t;
  typedef logic [RSELW-1:0] rsel_t;
  typedef logic [UADDRW-1:0] uaddr_t;

  typedef enum logic [2:0] {
    ALU_NOT  = 3'd0,  // ~a
    ALU_AND  = 3'd1,  // a & b
    ALU_OR   = 3'd2,  // a | b
    ALU_XOR  = 3'd3,  // a ^ b
    ALU_ADD  = 3'd4,  // a + b + cin
    ALU_SUB  = 3'd5,  // a + ~b + cin   (a - b when cin = 1)
    ALU_ADDA = 3'd6,  // a + cin
    ALU_SUBA = 3'd7   // a - 1 + cin
  } alu_op_e;

  typedef enum logic {
    MAR_HOLD = 1'b0,
    MAR_LOAD = 1'b1
  } mar_sel_e;

  typedef enum logic [1:0] {
    MDR_HOLD     = 2'd0,
    MDR_LOAD_ALU = 2'd1,
    MDR_LOAD_MEM = 2'd2
  } mdr_sel_e;

  typedef enum logic [1:0] {
    RES_ALU       = 2'd0,
    RES_MDR       = 2'd1,
    RES_IR_CONST4 = 2'd2,   // sign-extended 4-bit literal of a type-one instruction
    RES_IR_CONST8 = 2'd3    // 8-bit literal of a type-two instruction
  } result_sel_e;

  typedef enum logic {
    IRB_HOLD = 1'b0,
    IRB_LOAD = 1'b1
  } irb_sel_e;

  // Branch condition wires the sequencer can test.
  typedef enum logic [2:0] {
    C_TRUE  = 3'd0,
    C_M7    = 3'd1,
    C_COUT  = 3'd2,
    C_V     = 3'd3,
    C_Z     = 3'd4,
    C_WAIT  = 3'd5,
    C_FALSE = 3'd6
  } cond_e;

  // The 30 control wires of one cycle. All-zero is the idle word: nothing is written,
  // MAR and MDR hold, no memory operation.
  typedef struct packed {
    rsel_t        a_sel;
    rsel_t        b_sel;
    logic [NREGS-1:0] r_write;
    alu_op_e      alu_sel;
    logic         c_in;
    mar_sel_e     mar_sel;
    mdr_sel_e     mdr_sel;
    result_sel_e  result_sel;
    logic         read;
    logic         write;
    irb_sel_e     ir0_sel;
    irb_sel_e     ir1_sel;
    logic         ri_sel;
    logic         rj_sel;
    logic         rk_sel;
  } ctrl_t;

  // Branch part of a micro-instruction (canonical form: every line branches).
  typedef struct packed {
    cond_e   cond;
    uaddr_t  addr_true;
    uaddr_t  addr_false;
    logic    index_sel;    // add ir_opcode to the chosen address
  } branch_t;

  typedef struct packed {
    ctrl_t   ctrl;
    branch_t br;
  } uinstr_t;

  // Status wires from the datapath (ALU flags) to the control unit.
  typedef struct packed {
    logic cout;
    logic m7;
    logic v;
    logic z;
  } alu_status_t;

  // Instruction register fields.
  typedef struct packed {
    logic [OPW-1:0] opcode;
    logic [1:0]     ri;
    logic [1:0]     rj;
    logic [1:0]     rk;
    logic [3:0]     const4;
  } ir_fields_t;

  // Opcodes of the tiny instruction set.
  localparam logic [OPW-1:0] OP_NOOP   = 6'd0;  // no operation
  localparam logic [OPW-1:0] OP_ADD    = 6'd1;  // ri <- rj + rk
  localparam logic [OPW-1:0] OP_CONST8 = 6'd2;  // ri <- const8
  localparam logic [OPW-1:0] OP_BZERO  = 6'd3;  // if rj == 0: pc <- pc + sext(const4)
  localparam logic [OPW-1:0] OP_MOVE   = 6'd4;  // ri <- rj
  localparam logic [OPW-1:0] OP_STORE  = 6'd5;  // Mem[rj] <- rk
  localparam logic [OPW-1:0] OP_LOAD   = 6'd6;  // ri <- Mem[rj]

  localparam ctrl_t CTRL_IDLE = '0;

endpackage
