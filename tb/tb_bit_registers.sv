// tb_bit_registers: random load lines and sources against a reference model of
// the four registers, including the load-through operands.
module tb_bit_registers;
  logic clk = 0, rst_n = 0;
  logic [3:0] l = 0; logic dsel = 0, mem_bit = 0, gate_bit = 0, result = 0, data_in = 0;
  logic [3:0] r_q, m; logic a_op, b_op, data_out;
  int checks = 0, failures = 0;
  bit_registers dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    @(posedge clk); #1; rst_n = 1; m = 0;
    for (int i = 0; i < 200; i++) begin
      l = 4'($urandom); dsel = 1'($urandom); mem_bit = 1'($urandom);
      gate_bit = 1'($urandom); result = 1'($urandom); data_in = 1'($urandom);
      #1;
      checks++;
      if (a_op != (l[0] ? mem_bit : m[0]) || b_op != (l[1] ? gate_bit : m[1]) || data_out != m[3]) failures++;
      if (l[0]) m[0] = mem_bit;
      if (l[1]) m[1] = gate_bit;
      if (l[2]) m[2] = result;
      if (l[3]) m[3] = dsel ? result : data_in;
      @(posedge clk); #1;
      checks++; if (r_q != m) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
