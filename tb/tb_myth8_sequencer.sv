// tb_myth8_sequencer: tests the next-address logic and micro-program counter.
//
// Random branch fields, status wires, wait and opcode are applied each cycle; the next upc
// is predicted here as (c ? addr_true : addr_false) + (index_sel ? opcode : 0), modulo the
// 128-entry control store, with c chosen by the condition code, and compared after the clock
// edge. Also checks that reset returns upc to 0 and that every condition code is exercised.
module tb_myth8_sequencer;
  import myth8_pkg::*;

  logic           clk = 1'b0;
  logic           rst_n;
  branch_t        br;
  alu_status_t    status;
  logic           mem_wait;
  logic [OPW-1:0] ir_opcode;
  uaddr_t         upc, upc_next, expected;
  int unsigned    checks = 0, failures = 0;
  int unsigned    n_cond [8];

  always #5 clk = ~clk;

  myth8_sequencer dut (.clk, .rst_n, .br, .status, .mem_wait, .ir_opcode, .upc, .upc_next);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic cond_value(cond_e c);
    case (c)
      C_TRUE: return 1'b1;
      C_M7:   return status.m7;
      C_COUT: return status.cout;
      C_V:    return status.v;
      C_Z:    return status.z;
      C_WAIT: return mem_wait;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    for (int j = 0; j < 8; j++) n_cond[j] = 0;
    rst_n = 1'b0; br = '0; status = '0; mem_wait = 1'b0; ir_opcode = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (upc !== 7'd0) failures++;
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      br.cond       = cond_e'($urandom % 7);
      br.addr_true  = uaddr_t'($urandom);
      br.addr_false = uaddr_t'($urandom);
      br.index_sel  = ($urandom % 4 == 0);
      status        = 4'($urandom);
      mem_wait      = 1'($urandom);
      ir_opcode     = OPW'($urandom);
      #1;
      expected = (cond_value(br.cond) ? br.addr_true : br.addr_false)
                 + (br.index_sel ? uaddr_t'(ir_opcode) : 7'd0);
      n_cond[br.cond]++;
      @(posedge clk); #1;
      checks++;
      if (upc !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: upc=%0d expected %0d", k, upc, expected);
      end
    end
    for (int j = 0; j < 7; j++) begin
      checks++;
      if (n_cond[j] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
