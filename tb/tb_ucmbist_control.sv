// tb_ucmbist_control: runs the BIST controller against a 16 x 4 behavioural
// SRAM. For March C- and MATS it records every memory operation the
// controller issues and compares the trace, operation by operation, with the
// algorithm expanded independently from march notation; it checks the test
// time (10N+1 and 4N+1 cycles) and the verdict on a good memory, on
// stuck-at faults (detected, with the failing address) and on a 1->0
// transition fault (detected by March C-, escapes MATS).
module tb_ucmbist_control;
  import mbist_pkg::*;
  localparam int AW = 4, DW = 4, N = 2**AW;

  logic clk = 0, rst_n = 0;
  logic start;
  alg_e alg_sel;
  logic bist_active, bist_ce, bist_we, bist_oe, done, fail;
  logic [AW-1:0] bist_addr, fail_addr;
  logic [DW-1:0] bist_wdata, mem_rdata;
  logic [15:0] err_count;
  logic fault_en;
  logic [2:0] fault_type;
  logic [AW-1:0] fault_addr, aggr_addr;
  int unsigned fault_bit;
  int checks = 0, failures = 0;

  ucmbist_control #(.ADDR_W(AW), .DATA_W(DW)) dut (.*, .mem_rdata);

  sram_model #(.ADDR_W(AW), .DATA_W(DW)) mem (
    .clk, .ce(bist_ce), .we(bist_we), .oe(bist_oe), .addr(bist_addr), .wdata(bist_wdata),
    .rdata(mem_rdata), .fault_en, .fault_type, .fault_addr, .aggr_addr, .fault_bit);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one memory operation: {write, address, data}
  typedef struct { bit wr; int a; int d; } mop_t;
  mop_t seen[$];

  always @(posedge clk)
    if (rst_n && bist_ce) seen.push_back('{bist_we, int'(bist_addr), int'(bist_wdata)});

  // Expand "<U|D>:op,op" elements into the operation sequence over N words.
  function automatic void expand(input string alg[], ref mop_t q[$]);
    q.delete();
    foreach (alg[e]) begin
      string s = alg[e];
      int nops = (s.len() - 1) / 3;
      for (int i = 0; i < N; i++) begin
        int a = (s[0] == "D") ? N - 1 - i : i;
        for (int k = 0; k < nops; k++) begin
          bit w = (s[2 + 3*k] == "w");
          int d = (s[3 + 3*k] == "1") ? (1 << DW) - 1 : 0;
          q.push_back('{w, a, d});
        end
      end
    end
  endfunction

  task automatic run(input alg_e alg, input int ops_per_cell, input bit fe, input logic [2:0] ft,
                     input bit exp_fail, input bit check_trace, input string name);
    mop_t ref_q[$];
    int cycles = 0;
    fault_en = fe; fault_type = ft;
    // a 1->0 transition fault only escapes MATS if the cell powers up at 0
    mem.mem[fault_addr][fault_bit] = 1'b0;
    if (alg == ALG_MATS) expand('{"U:w0", "U:r0,w1", "U:r1"}, ref_q);
    else expand('{"U:w0", "U:r0,w1", "U:r1,w0", "D:r0,w1", "D:r1,w0", "U:r0"}, ref_q);
    seen.delete();
    @(negedge clk);
    alg_sel = alg; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done && cycles < 100000) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != ops_per_cell * N + 1) begin
      failures++; $display("%s: test took %0d cycles, expected %0d", name, cycles, ops_per_cell*N + 1);
    end
    checks++;
    if (fail !== exp_fail) begin failures++; $display("%s: fail=%b expected %b", name, fail, exp_fail); end
    if (exp_fail && (ft == 3'd0 || ft == 3'd1)) begin
      checks++;
      if (fail_addr !== fault_addr) begin failures++; $display("%s: fail_addr %0d", name, fail_addr); end
    end
    if (!exp_fail) begin
      checks++;
      if (err_count !== 0) begin failures++; $display("%s: err_count %0d", name, err_count); end
    end
    if (check_trace) begin
      checks++;
      if (seen.size() != ref_q.size()) begin
        failures++; $display("%s: %0d operations, expected %0d", name, seen.size(), ref_q.size());
      end else begin
        foreach (ref_q[i]) begin
          if (seen[i].wr != ref_q[i].wr || seen[i].a != ref_q[i].a || (seen[i].wr && seen[i].d != ref_q[i].d)) begin
            failures++;
            $display("%s: op %0d is wr=%0d a=%0d d=%0d, expected wr=%0d a=%0d d=%0d", name, i,
                     seen[i].wr, seen[i].a, seen[i].d, ref_q[i].wr, ref_q[i].a, ref_q[i].d);
            break;
          end
        end
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!done || bist_active) begin failures++; $display("%s: done not held", name); end
  endtask

  initial begin
    start = 0; alg_sel = ALG_MARCH_C_MINUS;
    fault_en = 0; fault_type = 0; fault_addr = 4'd6; aggr_addr = 4'd2; fault_bit = 2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (done || bist_active || bist_ce) begin failures++; $display("not idle after reset"); end
    run(ALG_MARCH_C_MINUS, 10, 0, 3'd0, 0, 1, "March C- good");
    run(ALG_MATS,           4, 0, 3'd0, 0, 1, "MATS good");
    run(ALG_MARCH_C_MINUS, 10, 1, 3'd0, 1, 0, "March C- SA0");
    run(ALG_MATS,           4, 1, 3'd1, 1, 0, "MATS SA1");
    run(ALG_MARCH_C_MINUS, 10, 1, 3'd3, 1, 0, "March C- TF down");
    run(ALG_MATS,           4, 1, 3'd3, 0, 0, "MATS TF down");
    run(ALG_MARCH_C_MINUS, 10, 1, 3'd4, 1, 0, "March C- CFin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
