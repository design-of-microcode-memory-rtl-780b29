// decod: microinstruction decoder of the microcode BIST.
//
// Purely combinational. Translates the encoded operation of a microinstruction
// into separate controls: read (R0, R1), write (W0, W1), data polarity (the
// "1" operations use the inverse background) and end of test (END). The
// address-order and last-operation bits are passed on with them. Spare
// operation codes decode to no read, no write: a no-operation. The decoder is
// named in the source design; the encoding is this design's own.
module decod
  import mbist_pkg::*;
(
  input  ucode_t instr,
  output ctl_t   ctl
);

  always_comb begin
    ctl          = '0;
    ctl.down     = instr.down;
    ctl.last     = instr.last;
    unique case (instr.op)
      OP_W0:   begin ctl.wr = 1'b1; ctl.inv = 1'b0; end
      OP_W1:   begin ctl.wr = 1'b1; ctl.inv = 1'b1; end
      OP_R0:   begin ctl.rd = 1'b1; ctl.inv = 1'b0; end
      OP_R1:   begin ctl.rd = 1'b1; ctl.inv = 1'b1; end
      OP_END:  ctl.end_test = 1'b1;
      default: ;
    endcase
  end

endmodule
