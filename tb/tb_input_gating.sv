// tb_input_gating: the latch captures the AND of the enabled mesh inputs when
// any N line is active and holds otherwise.
module tb_input_gating;
  logic clk = 0, rst_n = 0;
  logic [3:0] mesh_in = 0, n = 0;
  logic g_q, exp_g;
  int checks = 0, failures = 0;
  input_gating dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    @(posedge clk); #1; rst_n = 1; exp_g = 0;
    for (int i = 0; i < 100; i++) begin
      mesh_in = 4'($urandom); n = 4'($urandom);
      if (n != 0) begin
        exp_g = 1;
        for (int k = 0; k < 4; k++) if (n[k] && !mesh_in[k]) exp_g = 0;
      end
      @(posedge clk); #1;
      checks++; if (g_q != exp_g) begin failures++; $display("n=%b in=%b g=%b exp=%b", n, mesh_in, g_q, exp_g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
