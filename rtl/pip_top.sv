// pip_top: the propagated instruction processor.
//
// An external instruction pipeline feeds one nano-instruction per clock into
// a ROWS x COLS mesh of bit-serial processor elements. Each instruction
// enters every row at the west edge and moves east one column per clock, so
// successive instructions sweep across the stored image in closely spaced
// bands and no wire inside the array is longer than one PE pitch. An
// instruction presented on the pipeline output reaches column c after c+1
// clocks; a program of P nano-instructions therefore takes P + COLS clocks
// to pass over the whole array.
//
// Interface: prog_valid/prog_ready/prog_ctrl push program words; data_in
// and data_out are the north and south ends of the per-column I/O shift
// registers (column c is served c clocks after column 0); ctrl_out[r] is the
// control word leaving row r at the east edge.
// The design description sizes the array at 1000 x 1000 PEs; the default
// here is 64 x 64 (with the full 8 kbit per PE) so that the flattened array
// stays within what lint and elaboration tools can hold in memory. Set ROWS
// and COLS to 1000 for the described size. The pipeline depth is this
// design's own choice.
module pip_top
  import pip_pkg::*;
#(
  parameter int unsigned ROWS       = 64,
  parameter int unsigned COLS       = 64,
  parameter int unsigned MEM_BITS   = 1 << ADDR_W,
  parameter int unsigned PIPE_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_valid,
  output logic            prog_ready,
  input  ctrl_t           prog_ctrl,
  output logic            issued,
  input  logic [COLS-1:0] data_in,
  output logic [COLS-1:0] data_out,
  output ctrl_t           ctrl_out [ROWS]
);

  ctrl_t array_ctrl;
  logic  pipe_empty;

  instruction_pipeline #(.DEPTH(PIPE_DEPTH)) u_pipe (
    .clk, .rst_n,
    .in_valid(prog_valid), .in_ready(prog_ready), .in_ctrl(prog_ctrl),
    .ctrl_out(array_ctrl), .issued, .empty(pipe_empty)
  );

  pip_array #(.ROWS(ROWS), .COLS(COLS), .MEM_BITS(MEM_BITS)) u_array (
    .clk, .rst_n, .ctrl_in(array_ctrl), .ctrl_out, .data_in, .data_out
  );

endmodule
