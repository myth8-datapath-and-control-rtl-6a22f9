// myth8_cpu: the MYTH8 CPU, an 8-bit microprogrammed processor.
//
// The datapath (register file, ALU, result multiplexor, MAR, MDR, instruction register and
// register-select logic) is driven by a control unit made of the control-store ROM and the
// sequencer. Each cycle the ROM word at upc supplies the 30 control wires; the sequencer
// picks the next address from the word's branch fields, the ALU status (m7, c_out, v, z) and
// the memory's wait line, and indexes by the IR opcode at the end of fetch. r7 is the program
// counter and starts at 0 on reset; upc starts at fetch0.
// Memory port: mem_addr is MAR, mem_wdata is MDR. The CPU holds mem_read or mem_write high
// for as many cycles as the memory keeps mem_wait high; in the first cycle with mem_wait low
// a read takes mem_rdata (combinational from the memory) and a write is complete. The memory
// itself is outside this design. upc is brought out for observation.
// Cycle counts with a memory that answers after w wait cycles: fetch 5 + 2w cycles, then
// noop 1, add 1, const8 1, move 1, bzero 1 (not taken) or 2 (taken), load 3 + w,
// store 4 + w.
module myth8_cpu
  import myth8_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  output word_t   mem_addr,
  output word_t   mem_wdata,
  input  word_t   mem_rdata,
  output logic    mem_read,
  output logic    mem_write,
  input  logic    mem_wait,
  output uaddr_t  upc
);

  uinstr_t      uinstr;
  alu_status_t  status;
  ir_fields_t   ir;
  uaddr_t       upc_next;

  myth8_control_store u_control_store (
    .upc    (upc),
    .uinstr (uinstr)
  );

  myth8_sequencer u_sequencer (
    .clk       (clk),
    .rst_n     (rst_n),
    .br        (uinstr.br),
    .status    (status),
    .mem_wait  (mem_wait),
    .ir_opcode (ir.opcode),
    .upc       (upc),
    .upc_next  (upc_next)
  );

  myth8_datapath u_datapath (
    .clk       (clk),
    .rst_n     (rst_n),
    .ctrl      (uinstr.ctrl),
    .mem_rdata (mem_rdata),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .status    (status),
    .ir        (ir)
  );

  assign mem_read  = uinstr.ctrl.read;
  assign mem_write = uinstr.ctrl.write;

  // A memory operation is either a read or a write, never both.
  assert property (@(posedge clk) disable iff (!rst_n) !(mem_read && mem_write));

endmodule
