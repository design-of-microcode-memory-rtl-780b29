// tb_test_collar: random stimulus on both sides of the collar in both modes;
// checks that the selected side reaches the memory and where read data goes.
module tb_test_collar;
  logic bist_mode;
  logic sys_ce, sys_we, sys_oe, bist_ce, bist_we, bist_oe, mem_ce, mem_we, mem_oe;
  logic [7:0] sys_addr, bist_addr, mem_addr;
  logic [7:0] sys_wdata, sys_rdata, bist_wdata, bist_rdata, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  test_collar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      bist_mode = i[0];
      {sys_ce, sys_we, sys_oe, bist_ce, bist_we, bist_oe} = 6'($urandom);
      sys_addr = 8'($urandom); bist_addr = 8'($urandom);
      sys_wdata = 8'($urandom); bist_wdata = 8'($urandom); mem_rdata = 8'($urandom);
      #1;
      checks++;
      if (bist_mode) begin
        if (mem_ce !== bist_ce || mem_we !== bist_we || mem_oe !== bist_oe || mem_addr !== bist_addr
            || mem_wdata !== bist_wdata || sys_rdata !== 8'h00 || bist_rdata !== mem_rdata) begin
          failures++; $display("BIST mode mismatch at %0d", i);
        end
      end else begin
        if (mem_ce !== sys_ce || mem_we !== sys_we || mem_oe !== sys_oe || mem_addr !== sys_addr
            || mem_wdata !== sys_wdata || sys_rdata !== mem_rdata || bist_rdata !== mem_rdata) begin
          failures++; $display("functional mode mismatch at %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
