// tb_oe_we: exhaustive check of the enable generator.
module tb_oe_we;
  logic active, rd, wr, ce, oe, we;
  int checks = 0, failures = 0;

  oe_we dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {active, rd, wr} = i[2:0];
      #1;
      checks++;
      if (oe !== (active & rd & ~wr) || we !== (active & wr & ~rd) || ce !== (oe | we)) begin
        failures++;
        $display("active=%b rd=%b wr=%b -> ce=%b oe=%b we=%b", active, rd, wr, ce, oe, we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
