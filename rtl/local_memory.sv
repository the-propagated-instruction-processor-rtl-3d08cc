// local_memory: the PE's private 1-bit-wide data memory (8 kbit by default).
//
// One read and one write per clock at the same address: the read is
// asynchronous (the bit at addr is always visible on rdata) and the write
// happens on the clock edge when we is high. The PE holds only data here;
// there is no program memory in the array. The size follows the design
// description (1 kbyte per PE, address lines A0-A12); asynchronous read and
// the absence of a reset are this design's own choices, the content is
// undefined until written. DEPTH may be set below 2**ADDR_W to model a
// smaller memory; the upper address bits are then ignored.
module local_memory #(
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              wdata,
  output logic              rdata
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic          mem [DEPTH];
  logic [IW-1:0] idx;

  always_comb idx = addr[IW-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= wdata;
  end

  always_comb rdata = mem[idx];

endmodule
