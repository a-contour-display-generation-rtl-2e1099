// Contouring processor: an array of 2x2 cellular processors.
//
// A grid sheet of (COLS+1) x (ROWS+1) points has ROWS*COLS 2x2 subgrids,
// one cellular processor each; with the default 29 x 29 cells the array
// contours a 30 x 30 sheet. All cells share one system bus driven by the
// host (command and data word) and one return path, and are linked by a
// count-enable chain, cell k's Count Enable Out feeding cell k+1's Count
// Enable In, in row-major order. The cells work independently: a LEVEL
// command makes all of them contour their subgrids at once, with no
// communication among them.
//
// Return path: at most one cell returns a word in a cycle (the cell being
// counted, or the selected cell answering READ); the top ORs the cells'
// return words together. While a cell returns a freshly counted address,
// that word is what every cell sees as bus data, so the next cell in the
// chain can increment it; otherwise the cells see the host's data.
//
// Host protocol: RESET with data = base (count_en_in high) assigns the
// addresses base+1 ... base+ROWS*COLS, two cycles per cell, and
// count_en_out rises when done. Then ADDR/WRITE loads each cell, LEVEL
// starts contouring, busy falls when every cell is done, and ADDR/READ
// fetches each cell's coordinate count and quadruples (see cp_cell).
//
// The array of identical cells, the shared bus, the count-enable chain and
// the cell count per 30 x 30 sheet follow the source design; the chain
// order and the OR of the return words are this design's choices.
module contour_array
  import cp_pkg::*;
#(
  parameter int unsigned ROWS = 29,
  parameter int unsigned COLS = 29
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sysbus_t host_bus,
  input  logic    count_en_in,
  output logic    count_en_out,
  output logic    ret_valid,
  output word_t   ret_data,
  output logic    busy
);

  localparam int unsigned N = ROWS * COLS;

  logic [N:0]  chain;
  logic [N-1:0] c_valid, c_is_cnt, c_busy, c_has;
  word_t       c_data [N];
  sysbus_t     cell_bus;
  word_t       or_data;
  logic        any_cnt;

  assign chain[0] = count_en_in;

  for (genvar k = 0; k < N; k++) begin : g_cell
    corner_t    root;
    logic [1:0] cfg;
    logic [2:0] ncoord;
    cp_cell u_cell (
      .clk, .rst_n, .bus(cell_bus),
      .cnt_en_in(chain[k]), .cnt_en_out(chain[k+1]),
      .ret_valid(c_valid[k]), .ret_is_count(c_is_cnt[k]), .ret_data(c_data[k]),
      .busy(c_busy[k]), .has_addr(c_has[k]),
      .root, .cfg, .coord_count(ncoord)
    );
  end

  always_comb begin
    or_data = '0;
    for (int k = 0; k < N; k++) if (c_valid[k]) or_data |= c_data[k];
  end

  assign any_cnt      = |c_is_cnt;
  assign cell_bus.cmd = host_bus.cmd;
  assign cell_bus.data = any_cnt ? or_data : host_bus.data;

  assign count_en_out = chain[N];
  assign ret_valid    = |c_valid;
  assign ret_data     = or_data;
  assign busy         = |c_busy;

  // One returning cell at a time.
  a_one_return: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(c_valid));

endmodule
