// bit_processor: the 1-bit processor of a PE.
//
// Computes one of 16 functions (selected by F1-F4, see pip_pkg::func_e) of
// the operand bits a (register 1), b (register 2), c (register 3),
// d (register 4) and its own carry flip-flop. The result is captured in the
// result register q_q, which is the PE's mesh output to its four neighbours
// and the data written to memory by a store. The same result is offered
// combinationally on result so that registers 3 and 4 can capture it in the
// cycle it is computed. F_NOP leaves q_q and the carry unchanged, so a value
// stays visible at the mesh output while neighbours read it. The design
// description names the 1-bit processor and its function lines; the function
// set, the carry flip-flop and the registered result are this design's own
// choices (a bit-serial PE needs a carry to add multi-bit numbers).
//
// Timing: result is combinational; q_q and cy_q update on the clock edge.
module bit_processor
  import pip_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  func_e f,
  input  logic  a,
  input  logic  b,
  input  logic  c,
  input  logic  d,
  output logic  result,  // result of this cycle (q_q if the function holds)
  output logic  q_q,     // registered result: mesh output and store data
  output logic  cy_q     // carry flip-flop
);

  logic cy_next;

  always_comb begin
    result  = q_q;
    cy_next = cy_q;
    unique case (f)
      F_NOP:    ;
      F_PASS_A: result = a;
      F_ANDN:   result = a & ~b;
      F_PASS_B: result = b;
      F_NOT_A:  result = ~a;
      F_AND:    result = a & b;
      F_OR:     result = a | b;
      F_XOR:    result = a ^ b;
      F_ADD: begin
        result  = a ^ c ^ cy_q;
        cy_next = (a & c) | (a & cy_q) | (c & cy_q);
      end
      F_CLRC:   cy_next = 1'b0;
      F_SETC:   cy_next = 1'b1;
      F_PASS_C: result = c;
      F_PASS_D: result = d;
      F_ZERO:   result = 1'b0;
      F_ONE:    result = 1'b1;
      F_SUB: begin
        result  = a ^ ~c ^ cy_q;
        cy_next = (a & ~c) | (a & cy_q) | (~c & cy_q);
      end
      default:  ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_q  <= 1'b0;
      cy_q <= 1'b0;
    end else begin
      q_q  <= result;
      cy_q <= cy_next;
    end
  end

endmodule
