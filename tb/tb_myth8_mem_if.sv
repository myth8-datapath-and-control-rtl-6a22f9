// tb_myth8_mem_if: tests the MAR and MDR registers of the memory interface.
//
// Random cycles drive mar_sel, mdr_sel (HOLD, LOAD_ALU, LOAD_MEM), the ALU output and the
// memory read data; a shadow model here predicts MAR and MDR after each clock edge. Checks
// that the all-zero selects hold both registers and that reset clears them.
module tb_myth8_mem_if;
  import myth8_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  mar_sel_e  mar_sel;
  mdr_sel_e  mdr_sel;
  word_t     alu_m, mem_rdata, mar, mdr;
  word_t     exp_mar, exp_mdr;
  int unsigned checks = 0, failures = 0;
  int unsigned n_hold = 0, n_alu = 0, n_mem = 0;

  always #5 clk = ~clk;

  myth8_mem_if dut (.clk, .rst_n, .mar_sel, .mdr_sel, .alu_m, .mem_rdata, .mar, .mdr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; mar_sel = MAR_HOLD; mdr_sel = MDR_HOLD; alu_m = '0; mem_rdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    exp_mar = '0; exp_mdr = '0;
    checks++; if (mar !== 8'h00 || mdr !== 8'h00) failures++;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      mar_sel   = mar_sel_e'($urandom % 2);
      mdr_sel   = mdr_sel_e'($urandom % 3);
      alu_m     = word_t'($urandom);
      mem_rdata = word_t'($urandom);
      if (mar_sel == MAR_LOAD) exp_mar = alu_m;
      case (mdr_sel)
        MDR_LOAD_ALU: begin exp_mdr = alu_m;     n_alu++;  end
        MDR_LOAD_MEM: begin exp_mdr = mem_rdata; n_mem++;  end
        default:      n_hold++;
      endcase
      @(posedge clk); #1;
      checks++;
      if (mar !== exp_mar || mdr !== exp_mdr) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: mar=%02h mdr=%02h expected %02h %02h", k,
                                    mar, mdr, exp_mar, exp_mdr);
      end
    end
    checks++;
    if (n_hold == 0 || n_alu == 0 || n_mem == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
