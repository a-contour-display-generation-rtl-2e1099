// Shared types and constants of the contour display processor.
//
// The contour display processor is an array of identical 2x2 cellular
// processors. Each cell holds the four grid values of one 2x2 subgrid,
// builds the contouring tree of that subgrid and, for a broadcast contour
// level, generates up to four interpolated coordinates with a display pen
// command (setpoint or drawto) each. This package holds the system bus
// command set, the ALU operations, the pen command encoding and the fixed
// layout of the cell's 128-word working memory.
//
// The 16-bit word, the 128-word memory and the four add/sub/mul/div ALU
// functions follow the source design. The command encoding, the memory map
// and the fixed-point format of the coordinates are this design's choices.
package cp_pkg;

  localparam int unsigned WORD = 16;            // data word width
  localparam int unsigned ADDR_W = 15;          // external address width
  localparam int unsigned FRAC = 8;             // fraction bits of a coordinate

  typedef logic [WORD-1:0] word_t;

  // System bus commands, held in the External Instruction register.
  typedef enum logic [2:0] {
    CMD_NOP   = 3'd0,
    CMD_RESET = 3'd1,   // reset and count: address assignment along the chain
    CMD_ADDR  = 3'd2,   // data = address of the cell to select
    CMD_WRITE = 3'd3,   // data word for the selected cell's memory
    CMD_LEVEL = 3'd4,   // broadcast contour level, starts contouring
    CMD_READ  = 3'd5    // read the next output word of the selected cell
  } cmd_e;

  typedef struct packed {
    cmd_e  cmd;
    word_t data;
  } sysbus_t;

  // ALU operations.
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_MUL = 2'd2,
    ALU_DIV = 2'd3
  } alu_op_e;

  // Display pen command stored with each tree node and emitted with each
  // coordinate.
  typedef enum logic [0:0] {
    PEN_DRAWTO   = 1'b0,
    PEN_SETPOINT = 1'b1
  } pen_e;

  // Corner numbering, counterclockwise from the lower left corner.
  //   0 = (x0,   y0  )   1 = (x0+1, y0  )
  //   2 = (x0+1, y0+1)   3 = (x0,   y0+1)
  typedef logic [1:0] corner_t;

  // Working memory map of a cell.
  localparam logic [6:0] MA_V0    = 7'd0;   // 0..3: grid values of corners 0..3
  localparam logic [6:0] MA_X0    = 7'd4;   // grid x of corner 0
  localparam logic [6:0] MA_Y0    = 7'd5;   // grid y of corner 0
  localparam logic [6:0] MA_Z0    = 7'd6;   // plane coordinate of the sheet
  localparam logic [6:0] MA_LEVEL = 7'd7;   // current contour level
  localparam logic [6:0] MA_COUNT = 7'd8;   // number of coordinates produced
  localparam logic [6:0] MA_OUT   = 7'd9;   // 9..24: four (pen, x, y, z) quadruples
  localparam logic [6:0] MA_DEN   = 7'd26;  // scratch: interpolation denominator
  localparam logic [6:0] MA_FRAC  = 7'd27;  // scratch: interpolation fraction

  // Tree node: one entry of the enumeration list.
  typedef struct packed {
    corner_t node;      // grid corner this node stands for
    corner_t parent;    // grid corner of its parent (edge under consideration)
    pen_e    pen;       // pen command of the node
    logic [2:0] next;   // next node list: position to go to after a coordinate (6 = done)
  } tree_entry_t;

  localparam logic [2:0] POS_DONE = 3'd6;

endpackage
