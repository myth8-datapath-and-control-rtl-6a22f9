// tb_myth8_ir: tests the 16-bit instruction register and its field decoder.
//
// Loads random first and second instruction bytes with ir0_sel and ir1_sel (separately,
// together and not at all) and checks opcode, ri, rj, rk, the sign-extended 4-bit literal and
// the 8-bit literal against fields computed here from the two bytes.
module tb_myth8_ir;
  import myth8_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  irb_sel_e    ir0_sel, ir1_sel;
  word_t       mem_rdata, const4_ext, const8;
  ir_fields_t  fields;
  word_t       byte0, byte1;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  myth8_ir dut (.clk, .rst_n, .ir0_sel, .ir1_sel, .mem_rdata, .fields, .const4_ext, .const8);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int c4;
    c4 = int'(byte1[3:0]);
    if (c4 > 7) c4 -= 16;
    checks++;
    if (fields.opcode !== byte0[7:2] || fields.ri !== byte0[1:0] || fields.rj !== byte1[7:6] ||
        fields.rk !== byte1[5:4] || const8 !== byte1 || const4_ext !== word_t'(c4)) begin
      failures++;
      if (failures < 10)
        $display("FAIL bytes %02h %02h: op=%0d ri=%0d rj=%0d rk=%0d c4=%02h c8=%02h", byte0, byte1,
                 fields.opcode, fields.ri, fields.rj, fields.rk, const4_ext, const8);
    end
  endtask

  initial begin
    rst_n = 1'b0; ir0_sel = IRB_HOLD; ir1_sel = IRB_HOLD; mem_rdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    byte0 = '0; byte1 = '0;
    check();
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      mem_rdata = word_t'($urandom);
      ir0_sel   = irb_sel_e'($urandom % 2);
      ir1_sel   = irb_sel_e'($urandom % 2);
      if (ir0_sel == IRB_LOAD) byte0 = mem_rdata;
      if (ir1_sel == IRB_LOAD) byte1 = mem_rdata;
      @(posedge clk); #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
