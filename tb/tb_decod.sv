// tb_decod: exhaustive check of the instruction decoder over all 32
// microinstructions.
module tb_decod;
  import mbist_pkg::*;
  ucode_t instr;
  ctl_t ctl;
  int checks = 0, failures = 0;

  decod dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic [2:0] op;
      logic e_rd, e_wr, e_inv, e_end;
      op = i[4:2];
      instr = ucode_t'(i[4:0]);
      #1;
      e_rd  = (op == 3'd2) || (op == 3'd3);
      e_wr  = (op == 3'd0) || (op == 3'd1);
      e_end = (op == 3'd7);
      e_inv = (op == 3'd1) || (op == 3'd3);
      checks++;
      if (ctl.rd !== e_rd || ctl.wr !== e_wr || ctl.end_test !== e_end || ctl.inv !== e_inv
          || ctl.down !== i[1] || ctl.last !== i[0]) begin
        failures++;
        $display("instr %b: got %b", i[4:0], ctl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
