// tb_local_memory: random writes across the full 8 kbit, then every written
// address is read back against a reference copy.
module tb_local_memory;
  logic clk = 0;
  logic [12:0] addr = 0;
  logic we = 0, wdata = 0, rdata;
  bit   refm [8192];
  bit   valid [8192];
  int checks = 0, failures = 0;
  local_memory dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (30000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 8192; i++) begin
      addr = 13'(i); we = 1; wdata = 1'($urandom); refm[i] = wdata; valid[i] = 1;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      addr = 13'($urandom); we = 1'($urandom); wdata = 1'($urandom);
      #1; checks++; if (rdata != refm[addr]) failures++;
      if (we) refm[addr] = wdata;
      @(posedge clk); #1;
      checks++; if (rdata != refm[addr]) failures++;
    end
    we = 0;
    for (int i = 0; i < 8192; i++) begin
      addr = 13'(i); #1; checks++; if (rdata != refm[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
