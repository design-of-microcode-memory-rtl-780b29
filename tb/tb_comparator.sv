// tb_comparator: random reads with one-cycle latency; the returned data is
// corrupted now and then. Checks the sticky fail flag, the error count, the
// first failing address, that no compare happens without a read, and clear.
module tb_comparator;
  logic clk = 0, rst_n = 0;
  logic clear, rd;
  logic [7:0] expected, rdata;
  logic [5:0] addr, fail_addr;
  logic fail;
  logic [15:0] err_count;
  int checks = 0, failures = 0;

  comparator #(.DATA_W(8), .ADDR_W(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference
  bit m_fail; int m_cnt; logic [5:0] m_faddr;
  bit p_rd; logic [7:0] p_exp; logic [5:0] p_addr;
  int n_mismatch = 0, n_clear = 0;

  initial begin
    clear = 0; rd = 0; expected = 0; addr = 0; rdata = 0;
    m_fail = 0; m_cnt = 0; m_faddr = 0; p_rd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // data answering the previous cycle's read (or garbage if none)
      if (p_rd) rdata = (($urandom % 10) == 0) ? p_exp ^ 8'(1 << ($urandom % 8)) : p_exp;
      else      rdata = 8'($urandom);
      clear    = ($urandom % 400) == 0;
      rd       = 1'($urandom % 2);
      expected = 8'($urandom);
      addr     = 6'($urandom);
      @(posedge clk);
      if (clear) begin
        m_fail = 0; m_cnt = 0; m_faddr = 0; p_rd = 0; n_clear++;
      end else begin
        if (p_rd && rdata != p_exp) begin
          if (!m_fail) m_faddr = p_addr;
          m_fail = 1; m_cnt++; n_mismatch++;
        end
        p_rd = rd; p_exp = expected; p_addr = addr;
      end
      #1;
      checks++;
      if (fail !== m_fail || err_count !== 16'(m_cnt) || fail_addr !== m_faddr) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: fail=%b cnt=%0d faddr=%0d, expected %b %0d %0d",
                   i, fail, err_count, fail_addr, m_fail, m_cnt, m_faddr);
      end
    end
    checks++; if (n_mismatch == 0 || n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
