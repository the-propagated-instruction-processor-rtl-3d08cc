// pip_pkg: types and constants shared by the propagated-instruction processor.
//
// The control word is the set of lines that enters every row of the array at
// its west end and travels east one PE per clock. Its fields follow the
// labels of the processor-element diagram: a 13-bit memory address A0-A12,
// the store line ST, the function lines F1-F4, the register load lines L1-L4
// and the neighbour select lines N1-N4. Two lines are this design's own
// additions: AS (address strobe, so that an address can be set in one
// nano-instruction and used by later ones) and DSEL (chooses what the data
// I/O register loads). The element is described elsewhere as needing 35
// control lines; only the fields named on the diagram plus these two are
// built, 28 lines in all.
//
// The F field is read as a 4-bit function code (16 functions). The codes are
// this design's own choice.
package pip_pkg;

  localparam int unsigned ADDR_W = 13;  // A0-A12: 8 kbit memory per PE

  // 1-bit processor function codes (F1-F4 read as a 4-bit code, F1 = LSB).
  // Operands: a = register 1 (memory data), b = register 2 (neighbour data),
  // c = register 3 (result feedback), d = register 4 (data I/O register),
  // cy = carry flip-flop inside the processor.
  typedef enum logic [3:0] {
    F_NOP    = 4'd0,   // result and carry hold
    F_PASS_A = 4'd1,   // a
    F_ANDN   = 4'd2,   // a & ~b  (edge: pixel set, not all neighbours set)
    F_PASS_B = 4'd3,   // b
    F_NOT_A  = 4'd4,   // ~a
    F_AND    = 4'd5,   // a & b
    F_OR     = 4'd6,   // a | b
    F_XOR    = 4'd7,   // a ^ b
    F_ADD    = 4'd8,   // a + c + cy: result = sum, cy = carry out
    F_CLRC   = 4'd9,   // cy = 0, result holds
    F_SETC   = 4'd10,  // cy = 1, result holds
    F_PASS_C = 4'd11,  // c
    F_PASS_D = 4'd12,  // d
    F_ZERO   = 4'd13,  // 0
    F_ONE    = 4'd14,  // 1
    F_SUB    = 4'd15   // a + ~c + cy: result = difference bit, cy = no-borrow
  } func_e;

  // Neighbour select lines N1-N4 / mesh input order.
  localparam int unsigned DIR_N = 0;
  localparam int unsigned DIR_E = 1;
  localparam int unsigned DIR_S = 2;
  localparam int unsigned DIR_W = 3;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;  // A0-A12
    logic              as;    // address strobe: load addr into the address register
    logic              st;    // ST: write the processor result to memory
    func_e             f;     // F1-F4
    logic [3:0]        l;     // L1-L4 (bit 0 = L1)
    logic [3:0]        n;     // N1-N4 (bit 0 = N1 = north)
    logic              dsel;  // register 4 source: 0 = shift from north, 1 = processor result
  } ctrl_t;


  localparam ctrl_t CTRL_NOP = '{addr: '0, as: 1'b0, st: 1'b0, f: F_NOP,
                                 l: 4'b0, n: 4'b0, dsel: 1'b0};

endpackage
