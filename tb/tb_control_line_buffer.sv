// tb_control_line_buffer: random control words must reappear one clock later;
// reset must give the no-operation word.
module tb_control_line_buffer;
  import pip_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl_in = CTRL_NOP, ctrl_out, prev;
  int checks = 0, failures = 0;
  control_line_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    ctrl_in = ctrl_t'({$urandom, $urandom});
    @(posedge clk); #1;
    checks++; if (ctrl_out != CTRL_NOP) failures++;
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      prev = ctrl_t'({$urandom, $urandom});
      ctrl_in = prev;
      @(posedge clk); #1;
      checks++; if (ctrl_out != prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
