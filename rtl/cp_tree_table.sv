// Contouring tree table: enumeration list and next node list of a 2x2 tree.
//
// The root of a contouring tree is the subgrid's maximum corner M. Its three
// children, in counterclockwise order, are A (the next corner after M), O
// (the opposite corner, reached over the diagonal) and B (the corner before
// M). The two perimeter edges left over, A-O and O-B, each hang below the
// higher of their two end corners. That gives four tree shapes, selected by
//   cfg[0] = 1: edge A-O hangs below O (O is higher), else below A
//   cfg[1] = 1: edge O-B hangs below B (B is higher), else below O
// For a given root and shape this combinational table returns, for list
// position pos (0..5), the corner of that node, the corner of its parent
// (the edge under consideration), its pen command and its next node list
// entry. The enumeration order is top-down from the root and
// counterclockwise; the next node is the first node after the node's own
// subtree, or done (6).
//
// Pen commands: a node reached over a perimeter edge whose downhill
// direction is counterclockwise carries setpoint, every other node drawto.
// That makes A and a copy of O below A, or of B below O, setpoint nodes.
//
// The tree shapes, the ordering, the next node rule and the pen rule are
// the source design's; that position 0 is the root and the numeric encoding
// are this design's choices.
module cp_tree_table
  import cp_pkg::*;
(
  input  corner_t     root,   // maximum corner M
  input  logic [1:0]  cfg,    // tree shape
  input  logic [2:0]  pos,    // position in the enumeration list, 0..5
  output tree_entry_t entry
);

  // Nodes relative to the root: 0 = M, 1 = A, 2 = O, 3 = B.
  localparam logic [1:0] R_M = 2'd0, R_A = 2'd1, R_O = 2'd2, R_B = 2'd3;

  logic [1:0] rel_node, rel_par;
  pen_e       pen;
  logic [2:0] nxt;

  always_comb begin
    rel_node = R_M;
    rel_par  = R_M;
    pen      = PEN_DRAWTO;
    nxt      = POS_DONE;
    unique case (pos)
      3'd0: begin rel_node = R_M; rel_par = R_M; pen = PEN_DRAWTO; nxt = POS_DONE; end
      3'd1: begin
        rel_node = R_A; rel_par = R_M; pen = PEN_SETPOINT;
        nxt = cfg[0] ? 3'd2 : 3'd3;
      end
      default: begin
        unique case (cfg)
          // A-O below A, O-B below O: M, A, O', O, B', B
          2'b00: unique case (pos)
            3'd2: begin rel_node = R_O; rel_par = R_A; pen = PEN_SETPOINT; nxt = 3'd3; end
            3'd3: begin rel_node = R_O; rel_par = R_M; pen = PEN_DRAWTO;   nxt = 3'd5; end
            3'd4: begin rel_node = R_B; rel_par = R_O; pen = PEN_SETPOINT; nxt = 3'd5; end
            default: begin rel_node = R_B; rel_par = R_M; pen = PEN_DRAWTO; nxt = POS_DONE; end
          endcase
          // A-O below A, O-B below B: M, A, O', O, B, O''
          2'b10: unique case (pos)
            3'd2: begin rel_node = R_O; rel_par = R_A; pen = PEN_SETPOINT; nxt = 3'd3; end
            3'd3: begin rel_node = R_O; rel_par = R_M; pen = PEN_DRAWTO;   nxt = 3'd4; end
            3'd4: begin rel_node = R_B; rel_par = R_M; pen = PEN_DRAWTO;   nxt = POS_DONE; end
            default: begin rel_node = R_O; rel_par = R_B; pen = PEN_DRAWTO; nxt = POS_DONE; end
          endcase
          // A-O below O, O-B below O: M, A, O, A', B', B
          2'b01: unique case (pos)
            3'd2: begin rel_node = R_O; rel_par = R_M; pen = PEN_DRAWTO;   nxt = 3'd5; end
            3'd3: begin rel_node = R_A; rel_par = R_O; pen = PEN_DRAWTO;   nxt = 3'd4; end
            3'd4: begin rel_node = R_B; rel_par = R_O; pen = PEN_SETPOINT; nxt = 3'd5; end
            default: begin rel_node = R_B; rel_par = R_M; pen = PEN_DRAWTO; nxt = POS_DONE; end
          endcase
          // A-O below O, O-B below B: M, A, O, A', B, O''
          default: unique case (pos)
            3'd2: begin rel_node = R_O; rel_par = R_M; pen = PEN_DRAWTO;   nxt = 3'd4; end
            3'd3: begin rel_node = R_A; rel_par = R_O; pen = PEN_DRAWTO;   nxt = 3'd4; end
            3'd4: begin rel_node = R_B; rel_par = R_M; pen = PEN_DRAWTO;   nxt = POS_DONE; end
            default: begin rel_node = R_O; rel_par = R_B; pen = PEN_DRAWTO; nxt = POS_DONE; end
          endcase
        endcase
      end
    endcase
  end

  always_comb begin
    entry.node   = root + rel_node;
    entry.parent = root + rel_par;
    entry.pen    = pen;
    entry.next   = nxt;
  end

endmodule
