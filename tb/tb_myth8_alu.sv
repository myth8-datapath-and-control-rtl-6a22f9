// tb_myth8_alu: exhaustive-by-sampling test of the MYTH8 ALU.
//
// For every function and many random operand pairs and carry-ins, the result m and the
// status (c_out, m7, v, z) are compared with values computed here with integer arithmetic:
// c_out is bit 8 of the 9-bit sum, v is set when two operands of equal sign give a sum of the
// other sign. Also checks the corner cases the comparison rules depend on: 127 - (-128),
// -128 - 1, 0 - 1 with SUBA and equal operands with SUB.
module tb_myth8_alu;
  import myth8_pkg::*;

  alu_op_e     alu_sel;
  word_t       a, b, m;
  logic        c_in;
  alu_status_t status;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  myth8_alu dut (.alu_sel, .a, .b, .c_in, .m, .status);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(alu_op_e op, word_t av, word_t bv, logic ci);
    int x, y, s;
    logic [8:0] wide;
    word_t exp_m;
    logic exp_c, exp_v;
    alu_sel = op; a = av; b = bv; c_in = ci;
    #1;
    x = int'(av); exp_c = 1'b0; exp_v = 1'b0;
    case (op)
      ALU_NOT:  exp_m = ~av;
      ALU_AND:  exp_m = av & bv;
      ALU_OR:   exp_m = av | bv;
      ALU_XOR:  exp_m = av ^ bv;
      default: begin
        case (op)
          ALU_ADD:  y = int'(bv);
          ALU_SUB:  y = int'(8'(~bv));
          ALU_ADDA: y = 0;
          default:  y = 255;
        endcase
        s = x + y + int'(ci);
        wide  = 9'(s);
        exp_m = wide[7:0];
        exp_c = wide[8];
        exp_v = (av[7] == 8'(y) >> 7) && (exp_m[7] != av[7]);
      end
    endcase
    checks++;
    if (m !== exp_m || status.cout !== exp_c || status.v !== exp_v ||
        status.m7 !== exp_m[7] || status.z !== (exp_m == 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%02h b=%02h cin=%0b: m=%02h c=%0b v=%0b m7=%0b z=%0b, expected m=%02h c=%0b v=%0b",
                 op.name(), av, bv, ci, m, status.cout, status.v, status.m7, status.z, exp_m, exp_c, exp_v);
    end
  endtask

  initial begin
    // corner cases
    apply(ALU_SUB, 8'h7F, 8'h80, 1'b1);   // 127 - (-128): overflow
    apply(ALU_SUB, 8'h80, 8'h01, 1'b1);   // -128 - 1: overflow
    apply(ALU_SUBA, 8'h00, 8'h00, 1'b0);  // 0 - 1: no carry (bzero condition)
    apply(ALU_SUBA, 8'h05, 8'h00, 1'b0);  // 5 - 1: carry
    apply(ALU_SUB, 8'h33, 8'h33, 1'b1);   // equal: zero
    apply(ALU_ADD, 8'hFF, 8'h01, 1'b0);   // carry out, zero
    apply(ALU_ADDA, 8'h7F, 8'h00, 1'b1);  // 127 + 1: overflow
    // direct value checks independent of the model above
    alu_sel = ALU_ADD; a = 8'd100; b = 8'd27; c_in = 1'b1; #1;
    checks++; if (m !== 8'd128 || !status.v || status.cout) failures++;
    alu_sel = ALU_SUB; a = 8'd5; b = 8'd7; c_in = 1'b1; #1;
    checks++; if (m !== 8'hFE || status.cout || status.v || !status.m7) failures++;
    for (int k = 0; k < 4000; k++)
      apply(alu_op_e'(k % 8), 8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
