// local_control_buffer: holds the PE's memory address and drives the local
// control lines.
//
// A nano-instruction with the address strobe set loads A0-A12 into the
// address register; the address stays there for the nano-instructions that
// follow (load, store), so setting an address costs one slot of the
// instruction stream, as in the local-neighbourhood sequence of the design
// description. The store, function, load and neighbour lines of the
// current nano-instruction pass straight to the PE's units.
// Holding the address between instructions is this design's reading of the
// description; the reset value 0 is this design's own choice.
//
// Timing: addr_q changes on the clock edge that ends a cycle with as = 1, so
// a memory access in the following cycle uses the new address, while a store
// in the same cycle still uses the old one.
module local_control_buffer
  import pip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_t             ctrl,       // word from the control line buffer
  output logic [ADDR_W-1:0] addr_q,     // held memory address
  output logic              st,         // store enable
  output func_e             f,          // processor function
  output logic [3:0]        l,          // register loads L1-L4
  output logic [3:0]        n,          // neighbour selects N1-N4
  output logic              dsel        // register 4 source select
);

  always_ff @(posedge clk) begin
    if (!rst_n)       addr_q <= '0;
    else if (ctrl.as) addr_q <= ctrl.addr;
  end

  always_comb begin
    st   = ctrl.st;
    f    = ctrl.f;
    l    = ctrl.l;
    n    = ctrl.n;
    dsel = ctrl.dsel;
  end

endmodule
