// oe_we: memory enable generator of the microcode BIST.
//
// Combinational. While the test runs (`active`), a decoded read raises the
// chip enable and the read enable (OE), a decoded write the chip enable and
// the write enable (WE). Outside a test, and for a no-operation or END, all
// three stay low, and OE and WE are never high together. All enables are
// active high. The block is named in the source design ("OE WE"); the
// polarity is this design's choice.
module oe_we (
  input  logic active,
  input  logic rd,
  input  logic wr,
  output logic ce,
  output logic oe,
  output logic we
);

  always_comb begin
    oe = active && rd && !wr;
    we = active && wr && !rd;
    ce = oe || we;
  end

endmodule
