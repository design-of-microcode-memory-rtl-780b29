// test_collar: test collar between an embedded SRAM, its functional logic and
// the BIST.
//
// Four multiplexers, selected by `bist_mode`, decide who drives the memory:
// the address mux, the chip-enable mux, the control mux for the read (OE) and
// write (WE) enables, and the write-data mux. In functional mode the system
// side drives the memory and sees its read data; in BIST mode the BIST drives
// it and the system side reads zeros. The read data always goes to the BIST's
// comparator. Purely combinational. The collar and its four multiplexers are
// named in the source design; blanking the system read data is this design's
// choice.
module test_collar #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              bist_mode,
  // functional side
  input  logic              sys_ce,
  input  logic              sys_we,
  input  logic              sys_oe,
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_wdata,
  output logic [DATA_W-1:0] sys_rdata,
  // BIST side
  input  logic              bist_ce,
  input  logic              bist_we,
  input  logic              bist_oe,
  input  logic [ADDR_W-1:0] bist_addr,
  input  logic [DATA_W-1:0] bist_wdata,
  output logic [DATA_W-1:0] bist_rdata,
  // memory side
  output logic              mem_ce,
  output logic              mem_we,
  output logic              mem_oe,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  always_comb begin
    // muxaddr
    mem_addr  = bist_mode ? bist_addr : sys_addr;
    // muxce
    mem_ce    = bist_mode ? bist_ce : sys_ce;
    // muxcntr
    mem_we    = bist_mode ? bist_we : sys_we;
    mem_oe    = bist_mode ? bist_oe : sys_oe;
    // muxdata
    mem_wdata = bist_mode ? bist_wdata : sys_wdata;
    // read data
    sys_rdata  = bist_mode ? '0 : mem_rdata;
    bist_rdata = mem_rdata;
  end

endmodule
