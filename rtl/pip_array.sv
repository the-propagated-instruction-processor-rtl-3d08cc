// pip_array: the ROWS x COLS near-neighbour mesh of processor elements.
//
// The control word enters every row at its west end (column 0) and is
// passed east one PE per clock, so the PE in column c executes an
// instruction c+1 clocks after it is presented on ctrl_in: instructions
// sweep across the stored image column by column, one following another
// in consecutive clocks. All PEs of one column execute the same
// nano-instruction in the same clock. Each PE's mesh output goes to its
// four neighbours; PEs on the array edge see the constant BOUNDARY in
// place of a missing neighbour. The data I/O shift registers run down
// each column: column c loads data_in[c] at its top and presents the
// bottom PE's register 4 on data_out[c]. Because column c executes a
// shift c clocks after column 0, the data for column c must be presented
// (and is delivered) c clocks later than that for column 0.
// The mesh, the per-row control entry and the one-clock propagation follow
// the design description; the description sizes the array at
// 1000 x 1000, the default here is 64 x 64 (see pip_top).
// The I/O direction, the edge value and the single ctrl_in shared by all
// rows are this design's own choices.
//
// Interface: ctrl_in (one word per clock), ctrl_out[r] leaves row r at the
// east edge COLS clocks after entering; data_in/data_out per column.
module pip_array
  import pip_pkg::*;
#(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter int unsigned MEM_BITS = 1 << ADDR_W,
  parameter bit          BOUNDARY = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_t           ctrl_in,
  output ctrl_t           ctrl_out [ROWS],
  input  logic [COLS-1:0] data_in,
  output logic [COLS-1:0] data_out
);

  ctrl_t ctrl_w [ROWS][COLS+1];
  logic  mesh_w [ROWS][COLS];
  logic  data_w [ROWS+1][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    always_comb ctrl_w[r][0] = ctrl_in;
    always_comb ctrl_out[r]  = ctrl_w[r][COLS];

    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [3:0] mesh_in;

      always_comb begin
        mesh_in[DIR_N] = (r > 0)        ? mesh_w[(r > 0) ? r-1 : 0][c] : BOUNDARY;
        mesh_in[DIR_S] = (r < ROWS-1)   ? mesh_w[(r < ROWS-1) ? r+1 : r][c] : BOUNDARY;
        mesh_in[DIR_W] = (c > 0)        ? mesh_w[r][(c > 0) ? c-1 : 0] : BOUNDARY;
        mesh_in[DIR_E] = (c < COLS-1)   ? mesh_w[r][(c < COLS-1) ? c+1 : c] : BOUNDARY;
      end

      pip_pe #(.MEM_BITS(MEM_BITS)) u_pe (
        .clk, .rst_n,
        .ctrl_in (ctrl_w[r][c]),
        .ctrl_out(ctrl_w[r][c+1]),
        .mesh_in,
        .mesh_out(mesh_w[r][c]),
        .data_in (data_w[r][c]),
        .data_out(data_w[r+1][c])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_io
    always_comb data_w[0][c] = data_in[c];
    always_comb data_out[c]  = data_w[ROWS][c];
  end

endmodule
