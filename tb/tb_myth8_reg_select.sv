// tb_myth8_reg_select: exhaustive-by-sampling test of the virtual register-select logic.
//
// For random control lines and IR fields checks va_sel, vb_sel and vr_write: the IR field
// (zero-extended, so only r0..r3) when ri_sel / rj_sel / rk_sel is 1, the control program's
// own lines when it is 0, and a one-hot write of register ir.ri when ri_sel is 1.
module tb_myth8_reg_select;
  import myth8_pkg::*;

  rsel_t            a_sel, b_sel, va_sel, vb_sel;
  logic [NREGS-1:0] r_write, vr_write, exp_w;
  logic             ri_sel, rj_sel, rk_sel;
  logic [1:0]       ir_ri, ir_rj, ir_rk;
  int unsigned      checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  myth8_reg_select dut (.a_sel, .b_sel, .r_write, .ri_sel, .rj_sel, .rk_sel,
                        .ir_ri, .ir_rj, .ir_rk, .va_sel, .vb_sel, .vr_write);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      a_sel = rsel_t'($urandom); b_sel = rsel_t'($urandom); r_write = NREGS'($urandom);
      {ri_sel, rj_sel, rk_sel} = 3'($urandom);
      ir_ri = 2'($urandom); ir_rj = 2'($urandom); ir_rk = 2'($urandom);
      #1;
      exp_w = ri_sel ? (NREGS'(1) << ir_ri) : r_write;
      checks++;
      if (va_sel !== (rj_sel ? rsel_t'(ir_rj) : a_sel) ||
          vb_sel !== (rk_sel ? rsel_t'(ir_rk) : b_sel) || vr_write !== exp_w) begin
        failures++;
        if (failures < 10)
          $display("FAIL sel %b%b%b: va=%0d vb=%0d vw=%b", ri_sel, rj_sel, rk_sel, va_sel, vb_sel, vr_write);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
