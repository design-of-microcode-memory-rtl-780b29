// tb_march_minus: checks the microcode ROM against the March C- and MATS
// algorithms written out in march notation, element by element: every
// operation, its address order, the last-operation flag at the end of each
// element, the END instruction after each program and END in unused words.
module tb_march_minus;
  import mbist_pkg::*;
  logic [PC_W-1:0] addr;
  ucode_t instr;
  int checks = 0, failures = 0;
  ucode_t expect_rom [2**PC_W];

  march_minus dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fill the expected words of one program given as elements "<U|D>:op,op".
  function automatic void expand(int start, string alg[]);
    int a = start;
    foreach (alg[e]) begin
      string s;
      int nops;
      s = alg[e];
      nops = (s.len() - 1) / 3;
      for (int k = 0; k < nops; k++) begin
        string op;
        op = s.substr(2 + 3*k, 3 + 3*k);
        case (op)
          "w0":    expect_rom[a].op = OP_W0;
          "w1":    expect_rom[a].op = OP_W1;
          "r0":    expect_rom[a].op = OP_R0;
          default: expect_rom[a].op = OP_R1;
        endcase
        expect_rom[a].down = (s[0] == "D");
        expect_rom[a].last = (k == nops - 1);
        a++;
      end
    end
  endfunction

  initial begin
    foreach (expect_rom[i]) expect_rom[i] = '{op: OP_END, down: 1'b0, last: 1'b0};
    // March C-: up(w0) up(r0,w1) up(r1,w0) down(r0,w1) down(r1,w0) up(r0)
    expand(int'(MARCH_C_MINUS_START), '{"U:w0", "U:r0,w1", "U:r1,w0", "D:r0,w1", "D:r1,w0", "U:r0"});
    // MATS: up(w0) up(r0,w1) up(r1)
    expand(int'(MATS_START), '{"U:w0", "U:r0,w1", "U:r1"});
    for (int i = 0; i < 2**PC_W; i++) begin
      addr = i[PC_W-1:0];
      #1;
      checks++;
      if (instr !== expect_rom[i]) begin
        failures++;
        $display("addr %0d: got op=%0d down=%b last=%b, expected op=%0d down=%b last=%b", i,
                 instr.op, instr.down, instr.last, expect_rom[i].op, expect_rom[i].down, expect_rom[i].last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
