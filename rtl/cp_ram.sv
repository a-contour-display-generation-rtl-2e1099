// Cell working memory: 128 words of 16 bits.
//
// Single-port synchronous RAM. A write stores wdata at addr on the clock
// edge; the read data register rdata takes the word at addr on every clock
// edge (read-before-write), so a read returns its data one cycle after the
// address is presented. Contents are not reset.
//
// The size (128 words of 16 bits) follows the source design; the single
// port and the one-cycle registered read are this design's choices.
module cp_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
