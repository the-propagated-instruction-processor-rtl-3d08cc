// tb_local_control_buffer: the address register loads only on the strobe and
// holds otherwise; the other lines follow the current word.
module tb_local_control_buffer;
  import pip_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl = CTRL_NOP;
  logic [ADDR_W-1:0] addr_q, exp_addr;
  logic st, dsel; func_e f; logic [3:0] l, n;
  int checks = 0, failures = 0;
  local_control_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    @(posedge clk); #1; rst_n = 1; exp_addr = '0;
    checks++; if (addr_q != 0) failures++;
    for (int i = 0; i < 60; i++) begin
      ctrl = ctrl_t'({$urandom, $urandom});
      #1;
      checks++;
      if (st != ctrl.st || f != ctrl.f || l != ctrl.l || n != ctrl.n || dsel != ctrl.dsel) failures++;
      if (ctrl.as) exp_addr = ctrl.addr;
      @(posedge clk); #1;
      checks++; if (addr_q != exp_addr) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
