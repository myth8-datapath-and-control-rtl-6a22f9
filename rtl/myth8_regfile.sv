// myth8_regfile: the MYTH8 register file, r0..r7, each 8 bits wide.
//
// All eight registers take their input from the same result bus. Every register has its own
// write enable (r_write[j]); on a rising clock edge each register whose enable is 1 stores the
// result bus, so one result may land in several registers at once, or in none. Two read
// multiplexors present the registers chosen by a_sel and b_sel on the a and b outputs; they
// are set independently, so the same register can drive both. Reads are combinational, writes
// take effect at the next clock edge. By convention r0..r3 are the programmer's registers,
// r4..r6 temporaries of the control programs and r7 the program counter; the hardware treats
// them all alike. The asynchronous active-low reset to zero is this
// design's choice (it starts the program counter r7 at address 0).
module myth8_regfile
  import myth8_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  rsel_t             a_sel,
  input  rsel_t             b_sel,
  input  logic [NREGS-1:0]  r_write,
  input  word_t             result,
  output word_t             a,
  output word_t             b
);

  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NREGS; j++) regs[j] <= '0;
    end else begin
      for (int j = 0; j < NREGS; j++)
        if (r_write[j]) regs[j] <= result;
    end
  end

  assign a = regs[a_sel];
  assign b = regs[b_sel];

endmodule
