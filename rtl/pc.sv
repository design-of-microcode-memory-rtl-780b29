// pc: microprogram counter of the microcode BIST.
//
// Holds the address of the current microinstruction and, in a second
// register, the address of the first instruction of the march element being
// executed. Each cycle with `step` high it moves on:
//   - instruction not flagged last_op       -> next instruction;
//   - last_op, address not yet the last one -> back to the element start, so the
//     element's operations are repeated at the next address;
//   - last_op at the last address            -> next instruction, which becomes
//     the start of the next element.
// `load` (start of a test) sets both registers to the program entry point and
// has priority over `step`. Both registers update on the rising clock edge;
// `addr` is a register output. The program counter is named in the source
// design; the element-start register is this design's way of looping.
module pc
  import mbist_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [PC_W-1:0] load_addr,
  input  logic            step,
  input  logic            last_op,
  input  logic            addr_last,
  output logic [PC_W-1:0] addr
);

  logic [PC_W-1:0] elem_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr       <= '0;
      elem_start <= '0;
    end else if (load) begin
      addr       <= load_addr;
      elem_start <= load_addr;
    end else if (step) begin
      if (last_op && !addr_last) begin
        addr <= elem_start;
      end else begin
        addr <= addr + 1'b1;
        if (last_op) elem_start <= addr + 1'b1;
      end
    end
  end

endmodule
