// tb_data_gen: checks the data generator with the default all-zero background
// and with a 0x5A background.
module tb_data_gen;
  logic inv;
  logic [7:0] d0, d1;
  int checks = 0, failures = 0;

  data_gen #(.DATA_W(8))                      dut0 (.inv, .data(d0));
  data_gen #(.DATA_W(8), .BACKGROUND(8'h5A))  dut1 (.inv, .data(d1));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inv = 0; #1;
    checks += 2;
    if (d0 !== 8'h00) begin failures++; $display("inv=0: %h", d0); end
    if (d1 !== 8'h5A) begin failures++; $display("inv=0 bg: %h", d1); end
    inv = 1; #1;
    checks += 2;
    if (d0 !== 8'hFF) begin failures++; $display("inv=1: %h", d0); end
    if (d1 !== 8'hA5) begin failures++; $display("inv=1 bg: %h", d1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
