// mbist_top: microcode memory built-in self test for one embedded SRAM.
//
// The microcoded BIST controller (ucmbist_control) and the test collar
// (test_collar) that sits between the SRAM and the logic that normally uses
// it. The SRAM itself is outside this module: its ports are mem_*. While no
// test runs, the functional ports sys_* reach the SRAM unchanged (through the
// collar's multiplexers). A `start` pulse runs March C- (alg_sel = 0) or MATS
// (alg_sel = 1) over all 2**ADDR_W words; during the test `bist_active` is
// high and the collar gives the SRAM to the BIST. When the test ends, `done`
// rises and `fail` tells whether any read mismatched; `err_count` and
// `fail_addr` give the number of failing reads and the first failing address.
// The SRAM must be synchronous: read data one clock after mem_ce & mem_oe,
// writes on the clock edge with mem_ce & mem_we. Test time: 10N+1 cycles for
// March C-, 4N+1 for MATS, N = 2**ADDR_W. The default size (256 x 8) is this
// design's choice.
module mbist_top
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // BIST control
  input  logic              start,
  input  alg_e              alg_sel,
  output logic              bist_active,
  output logic              done,
  output logic              fail,
  output logic [15:0]       err_count,
  output logic [ADDR_W-1:0] fail_addr,
  // functional side
  input  logic              sys_ce,
  input  logic              sys_we,
  input  logic              sys_oe,
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_wdata,
  output logic [DATA_W-1:0] sys_rdata,
  // SRAM
  output logic              mem_ce,
  output logic              mem_we,
  output logic              mem_oe,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  logic              bist_ce, bist_we, bist_oe;
  logic [ADDR_W-1:0] bist_addr;
  logic [DATA_W-1:0] bist_wdata, bist_rdata;

  ucmbist_control #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ctrl (
    .clk, .rst_n, .start, .alg_sel,
    .bist_active,
    .bist_ce, .bist_we, .bist_oe, .bist_addr, .bist_wdata,
    .mem_rdata (bist_rdata),
    .done, .fail, .err_count, .fail_addr
  );

  test_collar #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_collar (
    .bist_mode (bist_active),
    .sys_ce, .sys_we, .sys_oe, .sys_addr, .sys_wdata, .sys_rdata,
    .bist_ce, .bist_we, .bist_oe, .bist_addr, .bist_wdata, .bist_rdata,
    .mem_ce, .mem_we, .mem_oe, .mem_addr, .mem_wdata, .mem_rdata
  );

endmodule
