// ucmbist_control: the microcoded memory BIST controller.
//
// A small sequencer runs a march test stored as microcode instead of a
// hard-wired state machine, so changing the algorithm means changing the
// microcode, not the control logic. Its parts:
//   pc          - program counter with the element-start (loop) register
//   march_minus - microcode ROM with the March C- and MATS programs
//   decod       - decodes the operation of the current microinstruction
//   addr_gen    - ascending / descending address sequence
//   data_gen    - write data and expected data
//   oe_we       - chip, read and write enables
//   comparator  - compares read data, sticky fail flag
// Operation: in IDLE (or DONE) a `start` pulse loads the entry point of the
// program chosen by `alg_sel` (0 = March C-, 1 = MATS), clears the address
// generator and the comparator and enters RUN. In RUN one memory operation is
// issued every clock cycle, so a march with k operations per cell on N words
// takes k*N cycles; the END instruction takes one more cycle, after which
// `done` is high and `fail` final (March C-: 10N+1 cycles from the start
// edge, MATS: 4N+1). `bist_active` is high during RUN and switches the test
// collar to the BIST. The memory is assumed to return read data one cycle
// after a read. done and fail hold until the next start.
// The block names come from the source design; the instruction format, the
// sequencing and the timing are this design's own.
module ucmbist_control
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  alg_e              alg_sel,
  output logic              bist_active,
  output logic              bist_ce,
  output logic              bist_we,
  output logic              bist_oe,
  output logic [ADDR_W-1:0] bist_addr,
  output logic [DATA_W-1:0] bist_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              done,
  output logic              fail,
  output logic [15:0]       err_count,
  output logic [ADDR_W-1:0] fail_addr
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  logic [PC_W-1:0]   pc_q;
  ucode_t            instr;
  ctl_t              ctl;
  logic              addr_last;
  logic              load, run, elem_end;
  logic [DATA_W-1:0] pattern;

  assign load     = (state != S_RUN) && start;
  assign run      = (state == S_RUN) && !ctl.end_test;
  assign elem_end = run && ctl.last && addr_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_RUN;
        S_RUN:   if (ctl.end_test) state <= S_DONE;
        S_DONE:  if (start) state <= S_RUN;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign bist_active = (state == S_RUN);
  assign done        = (state == S_DONE);

  pc u_pc (
    .clk, .rst_n,
    .load,
    .load_addr (alg_start(alg_sel)),
    .step      (run),
    .last_op   (ctl.last),
    .addr_last,
    .addr      (pc_q)
  );

  march_minus u_rom (.addr(pc_q), .instr);

  decod u_dec (.instr, .ctl);

  addr_gen #(.ADDR_W(ADDR_W)) u_addr (
    .clk, .rst_n,
    .clr  (load || elem_end),
    .inc  (run && ctl.last),
    .down (ctl.down),
    .addr (bist_addr),
    .last (addr_last)
  );

  data_gen #(.DATA_W(DATA_W)) u_data (.inv(ctl.inv), .data(pattern));
  assign bist_wdata = pattern;

  oe_we u_oewe (
    .active (run),
    .rd     (ctl.rd),
    .wr     (ctl.wr),
    .ce     (bist_ce),
    .oe     (bist_oe),
    .we     (bist_we)
  );

  comparator #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_cmp (
    .clk, .rst_n,
    .clear    (load),
    .rd       (bist_oe),
    .expected (pattern),
    .addr     (bist_addr),
    .rdata    (mem_rdata),
    .fail,
    .err_count,
    .fail_addr
  );

  // The memory is never asked to read and write in the same cycle.
  a_no_overlap: assert property (@(posedge clk)
    !(bist_oe && bist_we));

endmodule
