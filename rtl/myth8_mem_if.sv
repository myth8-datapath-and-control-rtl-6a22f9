// myth8_mem_if: the memory interface registers MAR and MDR.
//
// MAR (memory address register) drives the memory address. mar_sel = HOLD keeps it, LOAD
// loads it from the ALU output. MDR (memory data register) holds the data of a memory access:
// mdr_sel = HOLD keeps it (its value is then readable by the result multiplexor and by the
// memory), LOAD_ALU loads it from the ALU output (the data of a store), LOAD_MEM loads it from
// the memory's read data (a load). The all-zero select codes mean hold, so a control program
// that never names these lines leaves both registers unchanged. Both registers change on the
// rising clock edge; they are not visible to the machine-language programmer. The read and
// write lines go straight from the control unit to the memory and do not pass through here.
// The reset value of zero and the unused MDR code 3 acting as hold are this design's choices.
module myth8_mem_if
  import myth8_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  mar_sel_e  mar_sel,
  input  mdr_sel_e  mdr_sel,
  input  word_t     alu_m,
  input  word_t     mem_rdata,
  output word_t     mar,
  output word_t     mdr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mar <= '0;
      mdr <= '0;
    end else begin
      if (mar_sel == MAR_LOAD) mar <= alu_m;
      unique case (mdr_sel)
        MDR_LOAD_ALU: mdr <= alu_m;
        MDR_LOAD_MEM: mdr <= mem_rdata;
        default:      ;
      endcase
    end
  end

endmodule
