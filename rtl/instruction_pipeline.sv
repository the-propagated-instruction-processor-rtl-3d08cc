// instruction_pipeline: the external pipeline that drives nano-instructions
// into the west edge of the array.
//
// A program (a stream of control words) is pushed in with a valid/ready
// handshake and stacked in a FIFO of DEPTH words. On every clock the head
// word, if there is one, is issued on ctrl_out; when the FIFO is empty a
// no-operation word is issued instead (a bubble), so the array always
// receives one word per clock. in_ready falls while the FIFO is full
// (back-pressure on the program source). The description calls for an
// external pipeline that stacks the operation sequence and drives it into
// the array; the FIFO, its depth and the handshake are this design's own
// choices.
//
// Timing: a word accepted in cycle t can be issued at the earliest on the
// ctrl_out register in cycle t+1; issued pulses for one clock per word.
module instruction_pipeline
  import pip_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  ctrl_t in_ctrl,
  output ctrl_t ctrl_out,   // registered, one word per clock
  output logic  issued,     // ctrl_out holds a program word (not a bubble)
  output logic  empty
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  ctrl_t         fifo [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;
  logic          push, pop;

  always_comb begin
    empty    = (count == 0);
    in_ready = (count < (PW+1)'(DEPTH));
    push     = in_valid && in_ready;
    pop      = !empty;
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wr_ptr] <= in_ctrl;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      ctrl_out <= CTRL_NOP;
      issued   <= 1'b0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count    <= count + (PW+1)'(push) - (PW+1)'(pop);
      ctrl_out <= pop ? fifo[rd_ptr] : CTRL_NOP;
      issued   <= pop;
    end
  end

  // A full FIFO must never accept a word.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= (PW+1)'(DEPTH));

endmodule
