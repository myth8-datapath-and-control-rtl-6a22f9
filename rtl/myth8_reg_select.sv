// myth8_reg_select: turns the control program's register lines into the register file's
// "virtual" lines va_sel, vb_sel and vr_write, using the instruction register where asked.
//
//   va_sel   = rj_sel ? ir.rj : a_sel          (a multiplexor)
//   vb_sel   = rk_sel ? ir.rk : b_sel          (a multiplexor)
//   vr_write = ri_sel ? decode(ir.ri) : r_write (a 2-to-4 demux of ir.ri, then a multiplexor)
// The 2-bit IR fields can name only r0..r3, the programmer's registers; a control program
// reaches r4..r7 through a_sel, b_sel and r_write. With rj_sel, rk_sel and ri_sel at 0 the
// lines pass through unchanged, so control programs written before these selects existed
// still work. Purely combinational.
module myth8_reg_select
  import myth8_pkg::*;
(
  input  rsel_t             a_sel,
  input  rsel_t             b_sel,
  input  logic [NREGS-1:0]  r_write,
  input  logic              ri_sel,
  input  logic              rj_sel,
  input  logic              rk_sel,
  input  logic [1:0]        ir_ri,
  input  logic [1:0]        ir_rj,
  input  logic [1:0]        ir_rk,
  output rsel_t             va_sel,
  output rsel_t             vb_sel,
  output logic [NREGS-1:0]  vr_write
);

  logic [NREGS-1:0] ri_decoded;

  always_comb begin
    ri_decoded        = '0;
    ri_decoded[{1'b0, ir_ri}] = 1'b1;
  end

  assign va_sel   = rj_sel ? {1'b0, ir_rj} : a_sel;
  assign vb_sel   = rk_sel ? {1'b0, ir_rk} : b_sel;
  assign vr_write = ri_sel ? ri_decoded : r_write;

endmodule
