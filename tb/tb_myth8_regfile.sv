// tb_myth8_regfile: tests the MYTH8 register file against a shadow array.
//
// Random cycles drive random a_sel, b_sel, write enables (often several at once, sometimes
// none) and result values; after each clock edge both read ports are compared with the
// shadow copy for every selection, including a_sel == b_sel. Also checks that reset clears
// all eight registers and that a write appears only after the clock edge.
module tb_myth8_regfile;
  import myth8_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n;
  rsel_t            a_sel, b_sel;
  logic [NREGS-1:0] r_write;
  word_t            result, a, b;
  word_t            shadow [NREGS];
  int unsigned      checks = 0, failures = 0;

  always #5 clk = ~clk;

  myth8_regfile dut (.clk, .rst_n, .a_sel, .b_sel, .r_write, .result, .a, .b);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < NREGS; i++) begin
      a_sel = rsel_t'(i); b_sel = rsel_t'(NREGS - 1 - i); #1;
      checks++;
      if (a !== shadow[i] || b !== shadow[NREGS - 1 - i]) begin
        failures++;
        if (failures < 10) $display("FAIL r%0d: a=%02h b=%02h expected %02h %02h", i, a, b,
                                    shadow[i], shadow[NREGS - 1 - i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; r_write = '0; result = '0; a_sel = '0; b_sel = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NREGS; i++) shadow[i] = '0;
    check_all();
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      r_write = ($urandom % 4 == 0) ? '0 : NREGS'($urandom);
      result  = word_t'($urandom);
      a_sel   = rsel_t'($urandom);
      b_sel   = ($urandom % 3 == 0) ? a_sel : rsel_t'($urandom);
      #1;
      // before the edge the old values are still read
      checks++;
      if (a !== shadow[a_sel] || b !== shadow[b_sel]) begin
        failures++;
        if (failures < 10) $display("FAIL write visible before the clock edge");
      end
      @(posedge clk);
      for (int i = 0; i < NREGS; i++) if (r_write[i]) shadow[i] = result;
      @(negedge clk);
      r_write = '0;
      #1;
      checks++;
      if (a !== shadow[a_sel] || b !== shadow[b_sel]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: a=%02h b=%02h expected %02h %02h", k, a, b,
                                    shadow[a_sel], shadow[b_sel]);
      end
      if (k % 100 == 0) check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
