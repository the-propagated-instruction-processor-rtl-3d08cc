// tb_pip_pe: one PE with its neighbours driven by the testbench. Random bits
// are shifted in, stored at random addresses, read back to the mesh output,
// combined with neighbour inputs, and control words must leave one clock later.
module tb_pip_pe;
  import pip_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl_in = CTRL_NOP, ctrl_out;
  logic [3:0] mesh_in = 0; logic mesh_out, data_in = 0, data_out;
  int checks = 0, failures = 0;
  pip_pe dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // present a word; the PE executes it in the next cycle
  task automatic issue(ctrl_t w);
    ctrl_in = w; @(posedge clk); #1;
    checks++; if (ctrl_out != w) failures++;
  endtask
  function automatic ctrl_t mk(logic as_, logic [12:0] a, logic st_, func_e f_, logic [3:0] l_, logic [3:0] n_, logic d_);
    ctrl_t w; w.addr = a; w.as = as_; w.st = st_; w.f = f_; w.l = l_; w.n = n_; w.dsel = d_; return w;
  endfunction

  bit val [16]; logic [12:0] adr [16];
  initial begin
    @(posedge clk); #1; rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      val[i] = 1'($urandom); adr[i] = 13'(i * 509 + 7);
      issue(mk(0, 0, 0, F_NOP, 4'b1000, 0, 0));           // shift in (executes next cycle)
      data_in = val[i];
      issue(mk(1, adr[i], 0, F_PASS_D, 0, 0, 0));          // Q <- register 4, set address
      data_in = 0;
      issue(mk(0, 0, 1, F_NOP, 0, 0, 0));                  // store
      checks++; if (data_out != val[i] || mesh_out != val[i]) failures++;
    end
    issue(CTRL_NOP);
    for (int i = 0; i < 16; i++) begin
      issue(mk(1, adr[i], 0, F_ZERO, 0, 0, 0));
      issue(mk(0, 0, 0, F_PASS_A, 4'b0001, 0, 0));
      issue(CTRL_NOP);
      checks++; if (mesh_out != val[i]) failures++;
    end
    // neighbour accept then load neighbours and pass them
    for (int i = 0; i < 20; i++) begin
      logic [3:0] m, s; logic e;
      m = 4'($urandom); s = 4'($urandom) | 4'b0001;
      e = &(m | ~s);
      issue(mk(0, 0, 0, F_NOP, 0, s, 0));
      mesh_in = m;
      issue(mk(0, 0, 0, F_PASS_B, 4'b0010, 0, 0));
      mesh_in = 0;
      issue(CTRL_NOP);
      checks++; if (mesh_out != e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
