// addr_gen: address generator of the microcode BIST.
//
// Produces the address sequence of a march element over WORDS memory words,
// ascending or descending. A binary counter counts the addresses already
// finished in the element; an ascending element uses it as the address and a
// descending one its mirror, WORDS-1-count. The order can therefore change
// from one element to the next without a set-up cycle. `last` is high while
// the counter is at its final value. `clr` restarts the counter (priority),
// `inc` advances it; both act on the rising clock edge, `addr` and `last`
// follow the counter and the `down` input combinationally. The address
// generator is named in the source design; this structure is this design's.
module addr_gen #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned WORDS  = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  input  logic              down,
  output logic [ADDR_W-1:0] addr,
  output logic              last
);

  localparam logic [ADDR_W-1:0] TOP = ADDR_W'(WORDS - 1);

  logic [ADDR_W-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (clr)    count <= '0;
    else if (inc)    count <= (count == TOP) ? '0 : count + 1'b1;
  end

  assign last = (count == TOP);
  assign addr = down ? TOP - count : count;

endmodule
