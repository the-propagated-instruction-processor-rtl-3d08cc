// bit_registers: the four 1-bit working registers of a PE.
//
// Each register loads when its line L1-L4 is active:
//   register 1 <- the bit read from local memory
//   register 2 <- the latched neighbour input from the input gating
//   register 3 <- the processor result computed in the same cycle (feedback)
//   register 4 <- the data input from the PE to the north (shift, dsel = 0)
//                 or the processor result (dsel = 1); it drives the data
//                 output to the PE to the south, so the register-4 bits of a
//                 column form the I/O shift register.
// Registers 1 and 2 are "load-through": in a cycle in which one is loaded,
// the processor already sees the new value. This is what lets a load and a
// function share one nano-instruction (L1:F1 and L2:F2 in the neighbourhood
// sequence of the design description). The sources of each register, the
// load-through rule and the north-to-south direction of the I/O chain are
// this design's reading of the PE diagram, which shows memory, neighbour
// gating, processor feedback and data input entering the register block.
//
// Timing: r_q updates on the clock edge; a_op/b_op are combinational.
module bit_registers (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] l,        // L1-L4
  input  logic       dsel,     // register 4 source
  input  logic       mem_bit,  // from local memory
  input  logic       gate_bit, // from input gating
  input  logic       result,   // processor result of this cycle
  input  logic       data_in,  // register 4 of the PE to the north
  output logic [3:0] r_q,      // register contents, [0] = register 1
  output logic       a_op,     // operand a: register 1, load-through
  output logic       b_op,     // operand b: register 2, load-through
  output logic       data_out  // to the PE to the south
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_q <= '0;
    end else begin
      if (l[0]) r_q[0] <= mem_bit;
      if (l[1]) r_q[1] <= gate_bit;
      if (l[2]) r_q[2] <= result;
      if (l[3]) r_q[3] <= dsel ? result : data_in;
    end
  end

  always_comb begin
    a_op     = l[0] ? mem_bit  : r_q[0];
    b_op     = l[1] ? gate_bit : r_q[1];
    data_out = r_q[3];
  end

endmodule
