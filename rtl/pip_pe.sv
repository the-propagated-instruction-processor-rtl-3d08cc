// pip_pe: one processor element of the propagated-instruction array.
//
// The PE contains a control line buffer (register stage of the control path
// that runs along the row), a local control buffer (held memory address,
// local control lines), an 8 kbit local memory, input gating for the four
// mesh inputs, four 1-bit registers and a 1-bit processor. The PE executes
// the nano-instruction that sits in its control line buffer; the same word
// leaves on ctrl_out and the PE to the east executes it one clock later.
//
// Per cycle, for the word in the control line buffer:
//   as   : address register <- addr (used from the next cycle on)
//   st   : memory[address register] <- processor result register
//   l    : registers load (see bit_registers)
//   n    : neighbour inputs are combined and latched (see input_gating)
//   f    : processor result register <- function of the operands
// All of these happen together on the clock edge that ends the cycle.
// The structure follows the PE diagram of the design description; the
// operand routing and timing rules are this design's own choices, made so
// that the local-neighbourhood sequence of the description (A1, L1:F1, F1,
// N:F1, L2:A2:F2, ST) yields a correct result when it sweeps across columns.
//
// Interface: ctrl_in/ctrl_out west/east control path; mesh_in from the
// N/E/S/W neighbours' mesh_out; data_in from the north neighbour's data_out
// (the I/O shift register runs north to south).
module pip_pe
  import pip_pkg::*;
#(
  parameter int unsigned MEM_BITS = 1 << ADDR_W  // local memory size
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl_in,
  output ctrl_t      ctrl_out,
  input  logic [3:0] mesh_in,   // [0]=N, [1]=E, [2]=S, [3]=W
  output logic       mesh_out,
  input  logic       data_in,
  output logic       data_out
);

  ctrl_t          ctrl_q;
  logic [ADDR_W-1:0] addr_q;
  logic           st;
  func_e          f;
  logic [3:0]     l, n;
  logic           dsel;
  logic           mem_bit, gate_bit, result, q_q, cy_q;
  logic           a_op, b_op;
  logic [3:0]     r_q;

  control_line_buffer u_clb (
    .clk, .rst_n, .ctrl_in, .ctrl_out(ctrl_q)
  );

  always_comb ctrl_out = ctrl_q;

  local_control_buffer u_lcb (
    .clk, .rst_n, .ctrl(ctrl_q),
    .addr_q, .st, .f, .l, .n, .dsel
  );

  local_memory #(.ADDR_W(ADDR_W), .DEPTH(MEM_BITS)) u_mem (
    .clk, .addr(addr_q), .we(st), .wdata(q_q), .rdata(mem_bit)
  );

  input_gating u_gate (
    .clk, .rst_n, .mesh_in, .n, .g_q(gate_bit)
  );

  bit_registers u_regs (
    .clk, .rst_n, .l, .dsel, .mem_bit, .gate_bit, .result, .data_in,
    .r_q, .a_op, .b_op, .data_out
  );

  bit_processor u_proc (
    .clk, .rst_n, .f, .a(a_op), .b(b_op), .c(r_q[2]), .d(r_q[3]),
    .result, .q_q, .cy_q
  );

  always_comb mesh_out = q_q;

endmodule
