// comparator: output response analyser of the microcode BIST.
//
// The memory returns read data one clock after the read is issued. When `rd`
// is high the comparator registers the expected word and the address; in the
// next cycle it compares `rdata` with the stored word. A mismatch sets the
// sticky `fail` flag, increments `err_count` (saturating) and, for the first
// mismatch only, stores the address in `fail_addr`. `clear` (test start)
// resets all of it and cancels a pending compare. The comparator is named in
// the source design; the read latency, the error count and the failing
// address are this design's choices.
module comparator #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              rd,
  input  logic [DATA_W-1:0] expected,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] rdata,
  output logic              fail,
  output logic [15:0]       err_count,
  output logic [ADDR_W-1:0] fail_addr
);

  logic              pend;
  logic [DATA_W-1:0] exp_q;
  logic [ADDR_W-1:0] addr_q;

  logic mismatch;
  assign mismatch = pend && (rdata != exp_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      exp_q     <= '0;
      addr_q    <= '0;
      fail      <= 1'b0;
      err_count <= '0;
      fail_addr <= '0;
    end else if (clear) begin
      pend      <= 1'b0;
      fail      <= 1'b0;
      err_count <= '0;
      fail_addr <= '0;
    end else begin
      pend <= rd;
      if (rd) begin
        exp_q  <= expected;
        addr_q <= addr;
      end
      if (mismatch) begin
        fail <= 1'b1;
        if (!fail) fail_addr <= addr_q;
        if (err_count != '1) err_count <= err_count + 1'b1;
      end
    end
  end

endmodule
