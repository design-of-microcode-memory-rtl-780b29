// sram_model: behavioural model of a synchronous single-port SRAM with one
// injectable fault, used as the memory under test in the testbenches.
// Not synthesizable logic: a simulation model only.
//
// Write on the rising edge when ce & we; read data registered on the rising
// edge when ce & oe (one cycle latency), held otherwise. Contents start random.
// Fault (enabled by fault_en) on bit fault_bit of word fault_addr:
//   FLT_SA0 / FLT_SA1  stuck-at-0 / stuck-at-1 (cell always reads and holds it)
//   FLT_TF_UP          transition fault: the cell cannot go from 0 to 1
//   FLT_TF_DOWN        transition fault: the cell cannot go from 1 to 0
//   FLT_CFIN           inversion coupling fault: a 0->1 write on the same bit
//                      of word aggr_addr inverts the victim cell
module sram_model #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              we,
  input  logic              oe,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  input  logic              fault_en,
  input  logic [2:0]        fault_type,
  input  logic [ADDR_W-1:0] fault_addr,
  input  logic [ADDR_W-1:0] aggr_addr,
  input  int unsigned       fault_bit
);
  localparam logic [2:0] FLT_SA0 = 3'd0, FLT_SA1 = 3'd1, FLT_TF_UP = 3'd2,
                         FLT_TF_DOWN = 3'd3, FLT_CFIN = 3'd4;

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = DATA_W'($urandom);
    rdata = '0;
  end

  function automatic logic [DATA_W-1:0] stuck(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] r = d;
    if (fault_en && a == fault_addr && fault_type == FLT_SA0) r[fault_bit] = 1'b0;
    if (fault_en && a == fault_addr && fault_type == FLT_SA1) r[fault_bit] = 1'b1;
    return r;
  endfunction

  always @(posedge clk) begin
    if (ce && we) begin
      logic [DATA_W-1:0] old_v, new_v;
      old_v = mem[addr];
      new_v = wdata;
      if (fault_en && addr == fault_addr) begin
        if (fault_type == FLT_TF_UP   && !old_v[fault_bit] &&  new_v[fault_bit]) new_v[fault_bit] = 1'b0;
        if (fault_type == FLT_TF_DOWN &&  old_v[fault_bit] && !new_v[fault_bit]) new_v[fault_bit] = 1'b1;
      end
      mem[addr] = stuck(addr, new_v);
      if (fault_en && fault_type == FLT_CFIN && addr == aggr_addr && addr != fault_addr
          && !old_v[fault_bit] && new_v[fault_bit])
        mem[fault_addr][fault_bit] = ~mem[fault_addr][fault_bit];
    end else if (ce && oe) begin
      rdata <= stuck(addr, mem[addr]);
    end
  end
endmodule
