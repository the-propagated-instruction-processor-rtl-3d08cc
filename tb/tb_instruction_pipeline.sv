// tb_instruction_pipeline: words pushed with random gaps must come out in
// order, one per clock, with no-operation bubbles when the FIFO is empty.
module tb_instruction_pipeline;
  import pip_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, issued, empty;
  ctrl_t in_ctrl = CTRL_NOP, ctrl_out;
  ctrl_t sent [200];
  int nsent = 0, nrecv = 0, bubbles = 0;
  int checks = 0, failures = 0;
  instruction_pipeline #(.DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(negedge clk) if (rst_n) begin
    if (issued) begin
      checks++; if (ctrl_out != sent[nrecv]) failures++;
      nrecv++;
    end else begin
      bubbles++; checks++; if (ctrl_out != CTRL_NOP) failures++;
    end
  end
  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    while (nsent < 100) begin
      if ($urandom_range(0, 3) != 0) begin
        in_valid <= 1; in_ctrl <= ctrl_t'({$urandom, $urandom});
        @(posedge clk); #1;
        if (in_ready || 1) begin end
      end else begin
        in_valid <= 0; @(posedge clk);
      end
      if (in_valid && in_ready) begin end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++; if (nrecv != nsent) failures++;
    checks++; if (bubbles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // record accepted words
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin sent[nsent] = in_ctrl; nsent++; end
endmodule
