// tb_mbist_top: end-to-end test of the microcode memory BIST at its default
// size (256 x 8) with a behavioural SRAM behind the test collar.
// Sequence: functional writes and reads through the collar; March C- and MATS
// on a good memory (pass, 10N+1 and 4N+1 cycles); the memory contents left by
// March C- read back functionally; March C- and MATS on stuck-at faults
// (fail, first failing address); a 1->0 transition fault (March C- fails,
// MATS passes); an inversion coupling fault (March C- fails); a restart from
// the done state. It counts how often each mechanism of the design occurs:
// element repeat, element change, descending element, collar switch to BIST
// and back, functional access, mismatch, restart. Each must occur.
module tb_mbist_top;
  import mbist_pkg::*;
  localparam int AW = 8, DW = 8, N = 2**AW;

  logic clk = 0, rst_n = 0;
  logic start;
  alg_e alg_sel;
  logic bist_active, done, fail;
  logic [15:0] err_count;
  logic [AW-1:0] fail_addr;
  logic sys_ce, sys_we, sys_oe;
  logic [AW-1:0] sys_addr;
  logic [DW-1:0] sys_wdata, sys_rdata;
  logic mem_ce, mem_we, mem_oe;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic fault_en;
  logic [2:0] fault_type;
  logic [AW-1:0] fault_addr, aggr_addr;
  int unsigned fault_bit;
  int checks = 0, failures = 0;

  mbist_top dut (.*);

  sram_model #(.ADDR_W(AW), .DATA_W(DW)) mem (
    .clk, .ce(mem_ce), .we(mem_we), .oe(mem_oe), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .fault_en, .fault_type, .fault_addr, .aggr_addr, .fault_bit);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_repeat = 0, n_elem = 0, n_down = 0, n_to_bist = 0, n_to_func = 0;
  int n_func = 0, n_mismatch = 0, n_restart = 0;
  logic active_q = 0;
  logic [15:0] err_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.run && dut.u_ctrl.ctl.last && !dut.u_ctrl.addr_last) n_repeat++;
    if (dut.u_ctrl.elem_end) n_elem++;
    if (dut.u_ctrl.run && dut.u_ctrl.ctl.down && dut.u_ctrl.ctl.last && dut.u_ctrl.addr_last) n_down++;
    if (bist_active && !active_q) n_to_bist++;
    if (!bist_active && active_q) n_to_func++;
    if (err_count > err_q) n_mismatch++;
    if (done && start) n_restart++;
    active_q <= bist_active;
    err_q <= err_count;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic func_write(input int a, input int d);
    @(negedge clk);
    sys_ce = 1; sys_we = 1; sys_oe = 0; sys_addr = AW'(a); sys_wdata = DW'(d);
    @(negedge clk);
    sys_ce = 0; sys_we = 0;
    n_func++;
  endtask

  task automatic func_read(input int a, output logic [DW-1:0] d);
    @(negedge clk);
    sys_ce = 1; sys_oe = 1; sys_we = 0; sys_addr = AW'(a);
    @(negedge clk);
    sys_ce = 0; sys_oe = 0;
    d = sys_rdata;
    n_func++;
  endtask

  task automatic run(input alg_e alg, input int ops_per_cell, input bit exp_fail, input string name);
    int cycles = 0;
    @(negedge clk);
    alg_sel = alg; start = 1;
    @(negedge clk);
    start = 0;
    check(bist_active, {name, ": collar not in BIST mode"});
    // a functional read during the test sees zeros
    sys_ce = 1; sys_oe = 1; sys_addr = 8'h10;
    @(negedge clk);
    check(sys_rdata == 0, {name, ": functional read data not blocked"});
    sys_ce = 0; sys_oe = 0;
    cycles = 1;
    while (!done && cycles < 100000) begin @(negedge clk); cycles++; end
    check(cycles == ops_per_cell * N + 1,
          $sformatf("%s: test time %0d cycles, expected %0d", name, cycles, ops_per_cell * N + 1));
    check(fail == exp_fail, $sformatf("%s: fail=%b, expected %b", name, fail, exp_fail));
    check(!bist_active, {name, ": collar still in BIST mode"});
    $display("%s: %0d cycles, fail=%b, errors=%0d, first failing address %0d",
             name, cycles, fail, err_count, fail_addr);
  endtask

  logic [DW-1:0] rd;
  initial begin
    start = 0; alg_sel = ALG_MARCH_C_MINUS;
    sys_ce = 0; sys_we = 0; sys_oe = 0; sys_addr = 0; sys_wdata = 0;
    fault_en = 0; fault_type = 0; fault_addr = 8'd77; aggr_addr = 8'd12; fault_bit = 5;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // functional mode
    for (int i = 0; i < 8; i++) func_write(i * 31, 'hA0 + i);
    for (int i = 0; i < 8; i++) begin
      func_read(i * 31, rd);
      check(int'(rd) == 'hA0 + i, $sformatf("functional read %0d: %h", i, rd));
    end

    run(ALG_MARCH_C_MINUS, 10, 0, "March C-, good memory");
    check(err_count == 0, "error count on a good memory");
    for (int i = 0; i < 4; i++) begin
      func_read(i * 64 + 3, rd);
      check(rd == 8'h00, "March C- leaves the memory at 0");
    end
    // restart straight from the done state
    run(ALG_MATS, 4, 0, "MATS, good memory");
    for (int i = 0; i < 4; i++) begin
      func_read(i * 64 + 3, rd);
      check(rd == 8'hFF, "MATS leaves the memory at 1");
    end

    fault_en = 1;
    fault_type = 3'd0;
    run(ALG_MARCH_C_MINUS, 10, 1, "March C-, stuck-at-0");
    check(fail_addr == fault_addr, "stuck-at-0 failing address");
    check(err_count == 2, $sformatf("stuck-at-0 seen by the 2 reads of 1, got %0d", err_count));
    fault_type = 3'd1;
    run(ALG_MATS, 4, 1, "MATS, stuck-at-1");
    check(fail_addr == fault_addr, "stuck-at-1 failing address");
    fault_type = 3'd3;
    mem.mem[fault_addr][fault_bit] = 1'b0;
    run(ALG_MATS, 4, 0, "MATS, 1->0 transition fault (escapes)");
    mem.mem[fault_addr][fault_bit] = 1'b0;
    run(ALG_MARCH_C_MINUS, 10, 1, "March C-, 1->0 transition fault");
    fault_type = 3'd4;
    run(ALG_MARCH_C_MINUS, 10, 1, "March C-, inversion coupling fault");

    // back to functional use
    fault_en = 0;
    func_write(200, 'h3C);
    func_read(200, rd);
    check(rd == 8'h3C, "functional access after the tests");

    $display("mechanisms: repeat=%0d element=%0d down=%0d to_bist=%0d to_func=%0d functional=%0d mismatch=%0d restart=%0d",
             n_repeat, n_elem, n_down, n_to_bist, n_to_func, n_func, n_mismatch, n_restart);
    check(n_repeat > 0, "element repeat never happened");
    check(n_elem > 0, "element change never happened");
    check(n_down > 0, "descending element never happened");
    check(n_to_bist > 0 && n_to_func > 0, "collar mode switch never happened");
    check(n_func > 0, "functional access never happened");
    check(n_mismatch > 0, "mismatch never happened");
    check(n_restart > 0, "restart from done never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
