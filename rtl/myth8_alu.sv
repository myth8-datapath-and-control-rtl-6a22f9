// myth8_alu: the 8-bit MYTH8 arithmetic and logic unit.
//
// alu_sel picks one of eight functions of the a and b buses:
//   NOT  ~a            AND  a & b          OR   a | b          XOR  a ^ b
//   ADD  a + b + c_in  SUB  a + ~b + c_in  ADDA a + c_in       SUBA a - 1 + c_in
// Arithmetic is on two's complement numbers; subtraction a - b is SUB with c_in = 1.
// Every arithmetic function is one 8-bit addition of a, a second operand (b, ~b, 0 or all
// ones) and c_in, so a single adder serves all four. Status outputs: c_out, the carry out of
// bit 7; m7, the sign bit of the result; v, the overflow, carry out of bit 7 XOR carry out of
// bit 6; z, the result is zero. The unit is purely combinational.
// ADD = 100b follows the design; the codes of the other functions, and c_out = v = 0 for the
// logic functions, are this design's choices.
module myth8_alu
  import myth8_pkg::*;
(
  input  alu_op_e      alu_sel,
  input  word_t        a,
  input  word_t        b,
  input  logic         c_in,
  output word_t        m,
  output alu_status_t  status
);

  word_t      operand;
  logic       arith;
  logic [DW:0] sum;      // carry out of bit 7 in the top bit
  logic [DW-1:0] low;    // sum of the low 7 bits, carry out of bit 6 in bit 7

  always_comb begin
    arith   = 1'b1;
    operand = '0;
    unique case (alu_sel)
      ALU_ADD:  operand = b;
      ALU_SUB:  operand = ~b;
      ALU_ADDA: operand = '0;
      ALU_SUBA: operand = '1;
      default:  arith   = 1'b0;
    endcase
  end

  assign sum = {1'b0, a} + {1'b0, operand} + {{DW{1'b0}}, c_in};
  assign low = {1'b0, a[DW-2:0]} + {1'b0, operand[DW-2:0]} + {{(DW-1){1'b0}}, c_in};

  always_comb begin
    unique case (alu_sel)
      ALU_NOT: m = ~a;
      ALU_AND: m = a & b;
      ALU_OR:  m = a | b;
      ALU_XOR: m = a ^ b;
      default: m = sum[DW-1:0];
    endcase
  end

  assign status.cout = arith & sum[DW];
  assign status.v    = arith & (sum[DW] ^ low[DW-1]);
  assign status.m7   = m[DW-1];
  assign status.z    = (m == '0);

endmodule
