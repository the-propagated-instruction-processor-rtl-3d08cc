// tb_pip_top: end-to-end test of the propagated instruction processor.
//
// Loads a random binary image through the column I/O shift registers,
// stores it, runs the binary edge-finding nano-instruction sequence
// (set address, load+pass, pass, neighbour accept+pass, load neighbours +
// new address + edge function, store) as it sweeps across the columns,
// then reads the result back out through the shift registers and compares
// it with an edge map computed here (pixel set and not all four neighbours
// set, outside the array counts as 0). Also checks that a control word
// leaves the east edge COLS+1 clocks after the pipeline issues it, and
// counts each mechanism: input shifts, output shifts, stores, neighbour
// accepts, pipeline bubbles.
module tb_pip_top;
  import pip_pkg::*;

  localparam int R = 6;
  localparam int C = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_valid = 1'b0, prog_ready, issued;
  ctrl_t prog_ctrl = CTRL_NOP;
  logic [C-1:0] data_in = '0, data_out;
  ctrl_t ctrl_out [R];

  pip_top #(.ROWS(R), .COLS(C), .MEM_BITS(64), .PIPE_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_shift_in = 0, n_shift_out = 0, n_store = 0, n_neigh = 0, n_bubble = 0;

  // program storage
  ctrl_t prog [256];
  int    kind [256];   // 0 other, 1 shift in (row k), 2 shift out (row k)
  int    krow [256];
  int    plen = 0;

  bit img  [R][C];
  bit emap [R][C];
  bit got  [R][C];

  function automatic void add(ctrl_t w, int k = 0, int r = 0);
    prog[plen] = w; kind[plen] = k; krow[plen] = r; plen++;
  endfunction

  function automatic ctrl_t w_(logic as_, logic [ADDR_W-1:0] a, logic st_, func_e f_,
                               logic [3:0] l_, logic [3:0] n_, logic d_);
    ctrl_t w;
    w.addr = a; w.as = as_; w.st = st_; w.f = f_; w.l = l_; w.n = n_; w.dsel = d_;
    return w;
  endfunction

  // issue history: index of the program word on the pipeline output each cycle
  int hist [0:4095];
  int cyc = 0;
  int issue_cnt = 0;
  int issue_cyc_of_first = -1;

  initial begin
    // watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Track which word each column executes and drive/sample the I/O edge.
  always @(negedge clk) begin
    hist[cyc] = issued ? issue_cnt : -1;
    if (rst_n && first_out_cyc < 0 && ctrl_out[0] != CTRL_NOP) first_out_cyc = cyc;
    if (issued) begin
      if (issue_cyc_of_first < 0) issue_cyc_of_first = cyc;
      issue_cnt++;
    end
    if (!issued && rst_n && issue_cnt > 0 && issue_cnt < plen) n_bubble++;
    for (int c = 0; c < C; c++) begin
      int t, w;
      t = cyc - 1 - c;
      w = (t >= 0) ? hist[t] : -1;
      data_in[c] = 1'b0;
      if (w >= 0) begin
        if (kind[w] == 1) begin
          data_in[c] = img[R-1-krow[w]][c];
          if (c == 0) n_shift_in++;
        end
        if (kind[w] == 2) begin
          got[R-1-krow[w]][c] = data_out[c];
          if (c == 0) n_shift_out++;
        end
        if (c == 0 && prog[w].st) n_store++;
        if (c == 0 && prog[w].n != 0) n_neigh++;
      end
    end
    cyc++;
  end

  // latency check: first word appears at the east edge COLS+1 cycles after issue
  int first_out_cyc = -1;

  initial begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        img[r][c] = ($urandom_range(0, 99) < 65);
    // border-forced pattern: a solid block so interior pixels exist
    for (int r = 1; r < R/2; r++) for (int c = 1; c < C/2; c++) img[r][c] = 1'b1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        bit nn, ss, ee, ww;
        nn = (r > 0)   ? img[r-1][c] : 1'b0;
        ss = (r < R-1) ? img[r+1][c] : 1'b0;
        ww = (c > 0)   ? img[r][c-1] : 1'b0;
        ee = (c < C-1) ? img[r][c+1] : 1'b0;
        emap[r][c] = img[r][c] & ~(nn & ss & ee & ww);
      end

    // input image: R shifts, then move register 4 to memory address 0
    for (int k = 0; k < R; k++) add(w_(0, 0, 0, F_NOP, 4'b1000, 4'b0000, 0), 1, k);
    add(w_(1, 0, 0, F_PASS_D, 4'b0000, 4'b0000, 0));
    add(w_(0, 0, 1, F_NOP,    4'b0000, 4'b0000, 0));
    // local-neighbourhood edge sequence: A1, L1:F1, F1, N:F1, L2:A2:F2, ST
    add(w_(1, 0, 0, F_NOP,    4'b0000, 4'b0000, 0));
    add(w_(0, 0, 0, F_PASS_A, 4'b0001, 4'b0000, 0));
    add(w_(0, 0, 0, F_PASS_A, 4'b0000, 4'b0000, 0));
    add(w_(0, 0, 0, F_PASS_A, 4'b0000, 4'b1111, 0));
    add(w_(1, 1, 0, F_ANDN,   4'b0010, 4'b0000, 0));
    add(w_(0, 0, 1, F_NOP,    4'b0000, 4'b0000, 0));
    // output: address 1 -> register 4, then R shifts out
    add(w_(1, 1, 0, F_NOP,    4'b0000, 4'b0000, 0));
    add(w_(0, 0, 0, F_PASS_A, 4'b1001, 4'b0000, 1));
    for (int k = 0; k < R; k++) add(w_(0, 0, 0, F_NOP, 4'b1000, 4'b0000, 0), 2, k);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < plen; i++) begin
      if (i == 8) begin  // a gap in the program source produces bubbles
        prog_valid <= 1'b0;
        repeat (3) @(posedge clk);
      end
      prog_valid <= 1'b1;
      prog_ctrl  <= prog[i];
      @(posedge clk);
      while (!prog_ready) @(posedge clk);
    end
    prog_valid <= 1'b0;
    repeat (C + R + 10) @(posedge clk);

    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        checks++;
        if (got[r][c] !== emap[r][c]) begin
          failures++;
          $display("edge-map mismatch r=%0d c=%0d got=%0d exp=%0d img=%0d", r, c,
                   got[r][c], emap[r][c], img[r][c]);
        end
      end
    checks++;
    if (first_out_cyc - issue_cyc_of_first != C) begin
      failures++;
      $display("latency: first word at east edge %0d cycles after issue, expected %0d",
               first_out_cyc - issue_cyc_of_first, C);
    end
    $display("mechanisms: shift_in=%0d shift_out=%0d store=%0d neighbour=%0d bubble=%0d",
             n_shift_in, n_shift_out, n_store, n_neigh, n_bubble);
    checks++; if (n_shift_in  == 0) failures++;
    checks++; if (n_shift_out == 0) failures++;
    checks++; if (n_store     == 0) failures++;
    checks++; if (n_neigh     == 0) failures++;
    checks++; if (n_bubble    == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
