// tb_pip_array: control words must leave each row COLS clocks after entering,
// and a stream of 2*ROWS shift instructions must carry the bits presented on
// each column's data input to its data output ROWS shifts later, with the
// per-column skew of one clock per column.
module tb_pip_array;
  import pip_pkg::*;
  localparam int R = 3, C = 5, NS = 2 * R;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl_in = CTRL_NOP; ctrl_t ctrl_out [R];
  logic [C-1:0] data_in = 0, data_out;
  int checks = 0, failures = 0;
  pip_array #(.ROWS(R), .COLS(C), .MEM_BITS(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  bit din [NS][C];
  int cyc = 0, start = -1;
  ctrl_t sh;
  always @(negedge clk) begin
    if (start >= 0) begin
      for (int c = 0; c < C; c++) begin
        int k; k = cyc - start - 1 - c;   // shift index column c executes now
        data_in[c] = (k >= 0 && k < NS) ? din[k][c] : 1'b0;
        if (k >= R && k < NS) begin
          checks++; if (data_out[c] != din[k-R][c]) failures++;
        end
      end
      for (int r = 0; r < R; r++) begin
        int k; k = cyc - start - C;
        checks++;
        if ((k >= 0 && k < NS) ? (ctrl_out[r] != sh) : (ctrl_out[r] != CTRL_NOP)) failures++;
      end
    end
    cyc++;
  end
  initial begin
    for (int k = 0; k < NS; k++) for (int c = 0; c < C; c++) din[k][c] = 1'($urandom);
    sh = CTRL_NOP; sh.l = 4'b1000;
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    @(negedge clk); start = cyc;   // first shift word is presented this cycle
    ctrl_in = sh;
    repeat (NS) @(negedge clk);
    ctrl_in = CTRL_NOP;
    repeat (C + R + 6) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
