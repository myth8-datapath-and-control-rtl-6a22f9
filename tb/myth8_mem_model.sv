// myth8_mem_model: behavioural model of the memory a MYTH8 CPU is connected to (testbench
// use only; the memory is not part of the CPU design).
//
// 256 bytes. While read or write is asserted the model holds wait high for a number of
// cycles, then drops it for one cycle: in that cycle rdata (always mem[addr], combinational)
// is the read result, and a write stores wdata at the clock edge that ends it. The number of
// wait cycles of each access is drawn at random from 0..MAX_WAIT when the previous access
// completes (or fixed at MAX_WAIT when RANDOM is 0). wait_cycles and accesses count what
// happened, for the testbench's statistics.
module myth8_mem_model #(
  parameter int unsigned MAX_WAIT = 3,
  parameter bit          RANDOM   = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  input  logic        read,
  input  logic        write,
  output logic        mem_wait
);

  logic [7:0]  mem [256];
  int unsigned count;
  int unsigned latency;
  int unsigned wait_cycles;
  int unsigned accesses;

  function automatic int unsigned next_latency();
    return RANDOM ? $urandom_range(MAX_WAIT, 0) : MAX_WAIT;
  endfunction

  assign rdata    = mem[addr];
  assign mem_wait = (read || write) && (count < latency);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count       <= 0;
      latency     <= next_latency();
      wait_cycles <= 0;
      accesses    <= 0;
    end else if (read || write) begin
      if (mem_wait) begin
        count       <= count + 1;
        wait_cycles <= wait_cycles + 1;
      end else begin
        count    <= 0;
        latency  <= next_latency();
        accesses <= accesses + 1;
        if (write) mem[addr] <= wdata;
      end
    end else begin
      count <= 0;
    end
  end

endmodule
