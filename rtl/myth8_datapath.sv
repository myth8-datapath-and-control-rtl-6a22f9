// myth8_datapath: the complete MYTH8 datapath under one 30-wire control word.
//
// In each cycle the register file puts the registers chosen by va_sel and vb_sel on the a and
// b buses, the ALU applies alu_sel to a, b and c_in, and the result multiplexor picks what is
// written back: the ALU output m, the MDR, or one of the instruction register's literals
// (const4 sign-extended, or const8). That value is stored, at the clock edge, in every
// register whose vr_write bit is 1. The ALU output also feeds MAR and MDR; the memory's read
// data feeds MDR and the two halves of the instruction register. The register-select logic
// substitutes the IR's ri, rj, rk fields for the control program's register lines when
// ri_sel, rj_sel, rk_sel are set.
// Interface: ctrl is the control word of the current cycle; status (c_out, m7, v, z) and the
// IR fields go back to the control unit in the same cycle; mem_addr (= MAR) and mem_wdata
// (= MDR) go to the memory. The read and write lines of the control word go to the memory
// directly and are not used here. Everything listed in the design's datapath summary is
// here; the two extra result_sel codes for the literals are this design's encoding.
module myth8_datapath
  import myth8_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ctrl_t        ctrl,
  input  word_t        mem_rdata,
  output word_t        mem_addr,
  output word_t        mem_wdata,
  output alu_status_t  status,
  output ir_fields_t   ir
);

  rsel_t            va_sel, vb_sel;
  logic [NREGS-1:0] vr_write;
  word_t            a, b, m, result, mdr, const4_ext, const8;

  myth8_reg_select u_reg_select (
    .a_sel    (ctrl.a_sel),
    .b_sel    (ctrl.b_sel),
    .r_write  (ctrl.r_write),
    .ri_sel   (ctrl.ri_sel),
    .rj_sel   (ctrl.rj_sel),
    .rk_sel   (ctrl.rk_sel),
    .ir_ri    (ir.ri),
    .ir_rj    (ir.rj),
    .ir_rk    (ir.rk),
    .va_sel   (va_sel),
    .vb_sel   (vb_sel),
    .vr_write (vr_write)
  );

  myth8_regfile u_regfile (
    .clk     (clk),
    .rst_n   (rst_n),
    .a_sel   (va_sel),
    .b_sel   (vb_sel),
    .r_write (vr_write),
    .result  (result),
    .a       (a),
    .b       (b)
  );

  myth8_alu u_alu (
    .alu_sel (ctrl.alu_sel),
    .a       (a),
    .b       (b),
    .c_in    (ctrl.c_in),
    .m       (m),
    .status  (status)
  );

  always_comb begin
    unique case (ctrl.result_sel)
      RES_ALU:       result = m;
      RES_MDR:       result = mdr;
      RES_IR_CONST4: result = const4_ext;
      RES_IR_CONST8: result = const8;
      default:       result = m;
    endcase
  end

  myth8_mem_if u_mem_if (
    .clk       (clk),
    .rst_n     (rst_n),
    .mar_sel   (ctrl.mar_sel),
    .mdr_sel   (ctrl.mdr_sel),
    .alu_m     (m),
    .mem_rdata (mem_rdata),
    .mar       (mem_addr),
    .mdr       (mdr)
  );

  assign mem_wdata = mdr;

  myth8_ir u_ir (
    .clk        (clk),
    .rst_n      (rst_n),
    .ir0_sel    (ctrl.ir0_sel),
    .ir1_sel    (ctrl.ir1_sel),
    .mem_rdata  (mem_rdata),
    .fields     (ir),
    .const4_ext (const4_ext),
    .const8     (const8)
  );

endmodule
