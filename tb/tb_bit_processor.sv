// tb_bit_processor: every function code with random operands against a
// reference model, plus an 8-bit bit-serial addition and subtraction.
module tb_bit_processor;
  import pip_pkg::*;
  logic clk = 0, rst_n = 0;
  func_e f = F_NOP; logic a = 0, b = 0, c = 0, d = 0;
  logic result, q_q, cy_q;
  bit mq, mc, er, ec;
  int checks = 0, failures = 0;
  bit_processor dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    @(posedge clk); #1; rst_n = 1; mq = 0; mc = 0;
    for (int i = 0; i < 400; i++) begin
      f = func_e'(4'($urandom)); a = 1'($urandom); b = 1'($urandom); c = 1'($urandom); d = 1'($urandom);
      er = mq; ec = mc;
      case (f)
        F_PASS_A: er = a;        F_ANDN: er = a & ~b;   F_PASS_B: er = b;
        F_NOT_A: er = ~a;        F_AND: er = a & b;     F_OR: er = a | b;
        F_XOR: er = a ^ b;       F_PASS_C: er = c;      F_PASS_D: er = d;
        F_ZERO: er = 0;          F_ONE: er = 1;
        F_CLRC: ec = 0;          F_SETC: ec = 1;
        F_ADD: begin er = a ^ c ^ mc; ec = (a & c) | (a & mc) | (c & mc); end
        F_SUB: begin er = a ^ ~c ^ mc; ec = (a & ~c) | (a & mc) | (~c & mc); end
        default: ;
      endcase
      #1; checks++; if (result != er) failures++;
      @(posedge clk); #1; mq = er; mc = ec;
      checks++; if (q_q != mq || cy_q != mc) failures++;
    end
    // bit-serial 8-bit add and subtract
    for (int t = 0; t < 20; t++) begin
      logic [7:0] x, y, s;
      x = 8'($urandom); y = 8'($urandom);
      for (int op = 0; op < 2; op++) begin
        f = op ? F_SETC : F_CLRC; @(posedge clk); #1;
        for (int k = 0; k < 8; k++) begin
          f = op ? F_SUB : F_ADD; a = x[k]; c = y[k]; #1; s[k] = result;
          @(posedge clk); #1;
        end
        checks++; if (s != (op ? x - y : x + y)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
