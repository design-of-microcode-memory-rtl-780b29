// tb_addr_gen: checks the address generator with a non-power-of-two size
// (WORDS = 12) and a power-of-two one (16): full ascending and descending
// sweeps, the last flag, hold without inc, clear, and direction changes.
module tb_addr_gen;
  logic clk = 0, rst_n = 0;
  logic clr, inc, down;
  logic [3:0] addr_a, addr_b;
  logic last_a, last_b;
  int checks = 0, failures = 0;

  addr_gen #(.ADDR_W(4), .WORDS(12)) dut_a (.clk, .rst_n, .clr, .inc, .down, .addr(addr_a), .last(last_a));
  addr_gen #(.ADDR_W(4))             dut_b (.clk, .rst_n, .clr, .inc, .down, .addr(addr_b), .last(last_b));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ca, cb;  // reference counts
  initial begin
    clr = 0; inc = 0; down = 0; ca = 0; cb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      down = ($urandom % 8) == 0 ? ~down : down;
      clr  = ($urandom % 50) == 0;
      inc  = ($urandom % 4) != 0;
      #1;
      checks += 2;
      if (addr_a !== 4'(down ? 11 - ca : ca) || last_a !== (ca == 11)) begin
        failures++; $display("A: addr %0d last %b, count %0d down %b", addr_a, last_a, ca, down);
      end
      if (addr_b !== 4'(down ? 15 - cb : cb) || last_b !== (cb == 15)) begin
        failures++; $display("B: addr %0d last %b, count %0d down %b", addr_b, last_b, cb, down);
      end
      @(posedge clk);
      if (clr) begin ca = 0; cb = 0; end
      else if (inc) begin ca = (ca + 1) % 12; cb = (cb + 1) % 16; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
