// march_minus: microcode storage (ROM) of the microcode BIST.
//
// Holds the microprograms of the two test algorithms the design runs, one
// instruction per address, read combinationally:
//   March C- (entry 0, 10 operations per cell):
//     up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
//   MATS (entry 11, 4 operations per cell):
//     up(w0); up(r0,w1); up(r1)
// Elements whose order does not matter (written "any order" in march
// notation) run upwards. Each element's final instruction carries the `last`
// bit; each program ends with an END instruction. The algorithms follow the
// source design; holding both in one ROM and the instruction format (see
// mbist_pkg) are this design's choices. Unused addresses hold END.
module march_minus
  import mbist_pkg::*;
(
  input  logic [PC_W-1:0] addr,
  output ucode_t          instr
);

  function automatic ucode_t uc(op_e op, logic down, logic last);
    ucode_t u;
    u.op   = op;
    u.down = down;
    u.last = last;
    return u;
  endfunction

  always_comb begin
    unique case (addr)
      // March C-
      4'd0:    instr = uc(OP_W0,  1'b0, 1'b1);
      4'd1:    instr = uc(OP_R0,  1'b0, 1'b0);
      4'd2:    instr = uc(OP_W1,  1'b0, 1'b1);
      4'd3:    instr = uc(OP_R1,  1'b0, 1'b0);
      4'd4:    instr = uc(OP_W0,  1'b0, 1'b1);
      4'd5:    instr = uc(OP_R0,  1'b1, 1'b0);
      4'd6:    instr = uc(OP_W1,  1'b1, 1'b1);
      4'd7:    instr = uc(OP_R1,  1'b1, 1'b0);
      4'd8:    instr = uc(OP_W0,  1'b1, 1'b1);
      4'd9:    instr = uc(OP_R0,  1'b0, 1'b1);
      4'd10:   instr = uc(OP_END, 1'b0, 1'b0);
      // MATS
      4'd11:   instr = uc(OP_W0,  1'b0, 1'b1);
      4'd12:   instr = uc(OP_R0,  1'b0, 1'b0);
      4'd13:   instr = uc(OP_W1,  1'b0, 1'b1);
      4'd14:   instr = uc(OP_R1,  1'b0, 1'b1);
      default: instr = uc(OP_END, 1'b0, 1'b0);
    endcase
  end

endmodule
