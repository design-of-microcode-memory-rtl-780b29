// data_gen: data generator of the microcode BIST.
//
// Combinational. Gives the data word of the current operation: the data
// background for the "0" operations of a march (W0, R0) and its bitwise
// inverse for the "1" operations (W1, R1). The same word is the write data
// and the expected data of a read. The default background is all zeros, so the
// words are 00..0 and 11..1 as in the march notation. The data generator is
// named in the source design; the background parameter is this design's.
module data_gen #(
  parameter int unsigned          DATA_W     = 8,
  parameter logic [DATA_W-1:0]    BACKGROUND = '0
) (
  input  logic              inv,
  output logic [DATA_W-1:0] data
);

  assign data = inv ? ~BACKGROUND : BACKGROUND;

endmodule
