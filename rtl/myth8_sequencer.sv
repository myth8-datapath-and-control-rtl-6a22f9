// myth8_sequencer: the micro-program counter and next-address logic of the control unit.
//
// Each micro-instruction carries a branch: a condition select, a true address, a false
// address and an index_sel bit. The next control-store address is
//   (c ? addr_true : addr_false) + (index_sel ? ir_opcode : 0)
// where c is the chosen status wire (m7, c_out, v, z or the memory's wait) or a constant
// true or false. This one rule gives unconditional gotos (c = true, or both addresses
// equal), if-then and if-then-else branches, sequential execution (addr_false = the next
// line), and the indexed jump to the opcode's control program at the end of fetch (base
// address plus ir_opcode). The condition is taken from the status of the current cycle, so a
// line can compute a value and branch on its flags at once. upc changes on the rising clock
// edge and returns to 0 (fetch0) on reset. Only ir_opcode can index a jump, as in the design;
// the condition codes are this design's encoding.
module myth8_sequencer
  import myth8_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  branch_t        br,
  input  alu_status_t    status,
  input  logic           mem_wait,
  input  logic [OPW-1:0] ir_opcode,
  output uaddr_t         upc,
  output uaddr_t         upc_next
);

  logic   c;
  uaddr_t base;

  always_comb begin
    unique case (br.cond)
      C_TRUE:  c = 1'b1;
      C_M7:    c = status.m7;
      C_COUT:  c = status.cout;
      C_V:     c = status.v;
      C_Z:     c = status.z;
      C_WAIT:  c = mem_wait;
      default: c = 1'b0;
    endcase
  end

  assign base     = c ? br.addr_true : br.addr_false;
  assign upc_next = base + (br.index_sel ? uaddr_t'(ir_opcode) : uaddr_t'(0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) upc <= UADDR_FETCH0;
    else        upc <= upc_next;
  end

endmodule
