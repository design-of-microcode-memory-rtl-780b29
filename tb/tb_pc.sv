// tb_pc: self-checking testbench of the microprogram counter. Random load,
// step, last_op and addr_last stimulus is compared each cycle with a
// reference model of the sequencing rule (repeat the element until the last
// address, then fall through).
module tb_pc;
  import mbist_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, step, last_op, addr_last;
  logic [PC_W-1:0] load_addr, addr;
  int checks = 0, failures = 0;
  logic [PC_W-1:0] m_pc, m_el;
  int n_repeat = 0, n_next_elem = 0;

  pc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; step = 0; last_op = 0; addr_last = 0; load_addr = 0;
    m_pc = 0; m_el = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++; if (addr !== 0) begin failures++; $display("reset value %0d", addr); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load      = ($urandom % 20) == 0;
      load_addr = PC_W'($urandom);
      step      = ($urandom % 4) != 0;
      last_op   = 1'($urandom % 2);
      addr_last = ($urandom % 3) == 0;
      @(posedge clk);
      if (load) begin m_pc = load_addr; m_el = load_addr; end
      else if (step) begin
        if (last_op && !addr_last) begin m_pc = m_el; n_repeat++; end
        else begin
          m_pc = m_pc + 1;
          if (last_op) begin m_el = m_pc; n_next_elem++; end
        end
      end
      #1;
      checks++;
      if (addr !== m_pc) begin
        failures++;
        if (failures < 10) $display("cycle %0d: pc %0d expected %0d", i, addr, m_pc);
      end
    end
    checks++; if (n_repeat == 0 || n_next_elem == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
