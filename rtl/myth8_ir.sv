// myth8_ir: the 16-bit instruction register and its field decoder.
//
// Every MYTH8 instruction is two bytes. The fetch program reads the first byte with
// ir0_sel = LOAD and the second with ir1_sel = LOAD; each half is loaded from the memory's
// read data on the rising clock edge. The register is split into fields:
//   ir[15:10] opcode   ir[9:8] ri   ir[7:6] rj   ir[5:4] rk   ir[3:0] const4
// Type-one instructions use opcode, ri, rj, rk and the 4-bit literal; type-two instructions
// use opcode, ri and the 8-bit literal ir[7:0]. Both literals are two's complement: const4 is
// sign-extended to 8 bits. The field widths follow the design; the bit positions (first byte
// = opcode and ri) and the reset value are this design's choices.
module myth8_ir
  import myth8_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  irb_sel_e    ir0_sel,
  input  irb_sel_e    ir1_sel,
  input  word_t       mem_rdata,
  output ir_fields_t  fields,
  output word_t       const4_ext,
  output word_t       const8
);

  word_t ir0, ir1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir0 <= '0;
      ir1 <= '0;
    end else begin
      if (ir0_sel == IRB_LOAD) ir0 <= mem_rdata;
      if (ir1_sel == IRB_LOAD) ir1 <= mem_rdata;
    end
  end

  assign fields     = ir_fields_t'({ir0, ir1});
  assign const4_ext = {{(DW-4){fields.const4[3]}}, fields.const4};
  assign const8     = ir1;

endmodule
