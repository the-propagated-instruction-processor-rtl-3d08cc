// control_line_buffer: the per-PE stage of the propagated control path.
//
// Every control line that reaches a PE is registered here and handed on to
// the next PE to the east one clock later, so no control wire is longer than
// the PE-to-PE spacing. The registered word is also what this PE acts on.
// The one-clock delay per PE follows the design description; the
// synchronous reset to a no-operation word is this design's own choice.
//
// Interface: ctrl_in from the west neighbour (or the array edge),
// ctrl_out to the east neighbour and to the local control buffer.
// Timing: ctrl_out(t+1) = ctrl_in(t).
module control_line_buffer
  import pip_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl_in,
  output ctrl_t ctrl_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) ctrl_out <= CTRL_NOP;
    else        ctrl_out <= ctrl_in;
  end

endmodule
