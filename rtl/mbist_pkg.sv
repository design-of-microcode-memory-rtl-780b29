// mbist_pkg: types and constants shared by the microcode memory BIST.
//
// A microinstruction (ucode_t) names one memory operation of a march element
// and two sequencing bits:
//   op   : W0 / W1 write the data background or its inverse, R0 / R1 read and
//          compare against it, END stops the test. Codes 4..6 are spare and
//          decode as "no operation".
//   down : the element walks the addresses from high to low.
//   last : this is the last operation applied to one address; afterwards the
//          address advances and the program counter returns to the first
//          instruction of the element, or, at the last address, moves on to the
//          next element.
// The 5-bit format and its encoding are this design's own choice.
package mbist_pkg;

  typedef enum logic [2:0] {
    OP_W0  = 3'd0,
    OP_W1  = 3'd1,
    OP_R0  = 3'd2,
    OP_R1  = 3'd3,
    OP_END = 3'd7
  } op_e;

  typedef struct packed {
    op_e  op;
    logic down;
    logic last;
  } ucode_t;

  // Decoded controls of one microinstruction.
  typedef struct packed {
    logic rd;        // read and compare
    logic wr;        // write
    logic inv;       // data is the inverse background ("1")
    logic down;      // descending address order
    logic last;      // last operation at this address
    logic end_test;  // END instruction
  } ctl_t;

  // Width of the microcode address and the entry points of the two programs.
  localparam int unsigned PC_W = 4;

  typedef enum logic {
    ALG_MARCH_C_MINUS = 1'b0,
    ALG_MATS          = 1'b1
  } alg_e;

  localparam logic [PC_W-1:0] MARCH_C_MINUS_START = 4'd0;
  localparam logic [PC_W-1:0] MATS_START          = 4'd11;

  function automatic logic [PC_W-1:0] alg_start(alg_e alg);
    return (alg == ALG_MATS) ? MATS_START : MARCH_C_MINUS_START;
  endfunction

endpackage
