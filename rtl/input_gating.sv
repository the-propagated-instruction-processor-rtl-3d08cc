// input_gating: combines and latches the selected near-neighbour inputs.
//
// The four mesh inputs (north, east, south, west) are enabled by N1-N4. The
// enabled inputs are combined by AND (a PE with no line enabled sees 1), and
// in any cycle in which at least one N line is active the combined value is
// captured in the gating latch g_q. Register 2 loads from g_q in a later
// nano-instruction ("accept neighbour inputs", then "load the neighbour
// inputs to a local register"). The AND combination and the latch are this
// design's own choices; the AND lets one nano-instruction test "all selected
// neighbours are set", which is what binary edge finding needs.
//
// Timing: g_q(t+1) = AND of selected mesh_in(t) when |n(t), else g_q(t).
module input_gating (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] mesh_in,  // [0]=N, [1]=E, [2]=S, [3]=W neighbour outputs
  input  logic [3:0] n,        // N1-N4 enables
  output logic       g_q
);

  logic comb;

  always_comb comb = &(mesh_in | ~n);

  always_ff @(posedge clk) begin
    if (!rst_n)  g_q <= 1'b0;
    else if (|n) g_q <= comb;
  end

endmodule
