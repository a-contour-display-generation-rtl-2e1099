// Control section of a 2x2 cellular processor.
//
// On start (a contour level has just been written to memory) the control
// section runs the contouring procedure on the cell datapath: every step
// loads ALU-IN0 and ALU-IN1 from memory, an immediate or ALU-OUT, runs one
// ALU operation and may write ALU-OUT back to memory. A step takes five
// cycles (read, load IN0, load IN1, start, result), a divide 38.
//
// Procedure:
//  1. Maximum: corners 0..3 are compared in counterclockwise order; the
//     first of equal maxima becomes the root M.
//  2. Tree shape: edge A-O hangs below the higher of A and O, edge O-B below
//     the higher of O and B (on a tie below A, resp. O).
//  3. Display generation: the enumeration list (cp_tree_table) is walked
//     from the root. A node whose value is above the level is passed over.
//     For a node at or below the level a coordinate is interpolated on the
//     edge from its parent, frac = (vp - level) * 2^FRAC / (vp - vnode),
//     emitted with the node's pen command, and the walk jumps to the node's
//     next node list entry. A root at or below the level ends the walk with
//     no coordinate, as does the end of the list.
//  4. The number of coordinates is written to MA_COUNT and busy drops.
// Memory write data is ALU-OUT itself (its low word).
// Each coordinate is a quadruple (pen, x, y, z) at MA_OUT + 4*k, with
// x = (x0 + cx_parent) * 2^FRAC +- frac, and likewise y; z = z0 * 2^FRAC.
//
// The maximum rule, the attachment rule, the enumeration and next node
// lists, the "less than or equal" test, linear interpolation and the
// quadruple per coordinate are the source design's. The source design runs
// this procedure from a microprogram it does not list; here it is a
// hardwired sequencer, and the step order, the tie rules for edges, the
// fixed-point format and the memory map are this design's choices.
module cp_control
  import cp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  // memory port (used while busy)
  output logic        mem_we,
  output logic [6:0]  mem_addr,
  output word_t       mem_wdata,
  input  word_t       mem_rdata,
  // ALU
  output logic        alu_start,
  output alu_op_e     alu_op,
  output logic [2*WORD-1:0] alu_in0,
  output word_t       alu_in1,
  input  logic [2*WORD-1:0] alu_out,
  input  logic        alu_done,
  input  logic        flag_zero,
  input  logic        flag_borrow,
  // status of the last run
  output corner_t     root,
  output logic [1:0]  cfg,
  output logic [2:0]  coord_count
);

  typedef enum logic [4:0] {
    S_IDLE, S_MAX, S_E1, S_E2, S_NODE, S_DEN, S_NUM, S_SCALE, S_DIV,
    S_X1, S_X2, S_X3, S_Y1, S_Y2, S_Y3, S_Z, S_PEN, S_COUNT
  } step_e;

  typedef enum logic [2:0] {P_A, P_B, P_C, P_D, P_E} phase_e;

  typedef enum logic [1:0] {SRC_RAM, SRC_IMM, SRC_OUT} src_e;

  typedef struct packed {
    src_e       s0;
    logic [6:0] a0;
    word_t      i0;
    src_e       s1;
    logic [6:0] a1;
    word_t      i1;
    alu_op_e    op;
    logic       wr;
    logic [6:0] dst;
  } uop_t;

  step_e       step;
  phase_e      phase;
  logic [1:0]  idx;       // corner under test while finding the maximum
  logic [2:0]  pos;       // position in the enumeration list
  tree_entry_t ent;
  uop_t        u;

  localparam word_t ONE_FX = word_t'(1 << FRAC);

  cp_tree_table u_table (.root(root), .cfg(cfg), .pos(pos), .entry(ent));

  corner_t c_a, c_o, c_b;
  assign c_a = root + 2'd1;
  assign c_o = root + 2'd2;
  assign c_b = root + 2'd3;

  function automatic logic cx(corner_t c);
    return (c == 2'd1) || (c == 2'd2);
  endfunction
  function automatic logic cy(corner_t c);
    return (c == 2'd2) || (c == 2'd3);
  endfunction

  logic [6:0] qbase;
  assign qbase = MA_OUT + {2'b00, coord_count, 2'b00};

  // Step descriptor.
  always_comb begin
    u = '{s0: SRC_RAM, a0: '0, i0: '0, s1: SRC_RAM, a1: '0, i1: '0,
          op: ALU_ADD, wr: 1'b0, dst: '0};
    unique case (step)
      S_MAX:  begin u.op = ALU_SUB; u.a0 = {5'd0, idx}; u.a1 = {5'd0, root}; end
      S_E1:   begin u.op = ALU_SUB; u.a0 = {5'd0, c_o}; u.a1 = {5'd0, c_a}; end
      S_E2:   begin u.op = ALU_SUB; u.a0 = {5'd0, c_b}; u.a1 = {5'd0, c_o}; end
      S_NODE: begin u.op = ALU_SUB; u.a0 = {5'd0, ent.node}; u.a1 = MA_LEVEL; end
      S_DEN:  begin
        u.op = ALU_SUB; u.a0 = {5'd0, ent.parent}; u.a1 = {5'd0, ent.node};
        u.wr = 1'b1; u.dst = MA_DEN;
      end
      S_NUM:  begin u.op = ALU_SUB; u.a0 = {5'd0, ent.parent}; u.a1 = MA_LEVEL; end
      S_SCALE: begin u.op = ALU_MUL; u.s0 = SRC_OUT; u.s1 = SRC_IMM; u.i1 = ONE_FX; end
      S_DIV:  begin
        u.op = ALU_DIV; u.s0 = SRC_OUT; u.a1 = MA_DEN; u.wr = 1'b1; u.dst = MA_FRAC;
      end
      S_X1:   begin u.op = ALU_ADD; u.a0 = MA_X0; u.s1 = SRC_IMM; u.i1 = word_t'(cx(ent.parent)); end
      S_Y1:   begin u.op = ALU_ADD; u.a0 = MA_Y0; u.s1 = SRC_IMM; u.i1 = word_t'(cy(ent.parent)); end
      S_X2, S_Y2: begin u.op = ALU_MUL; u.s0 = SRC_OUT; u.s1 = SRC_IMM; u.i1 = ONE_FX; end
      S_X3:   begin
        u.s0 = SRC_OUT; u.wr = 1'b1; u.dst = qbase + 7'd1;
        if (cx(ent.node) == cx(ent.parent)) begin
          u.op = ALU_ADD; u.s1 = SRC_IMM; u.i1 = '0;
        end else begin
          u.op = cx(ent.node) ? ALU_ADD : ALU_SUB; u.a1 = MA_FRAC;
        end
      end
      S_Y3:   begin
        u.s0 = SRC_OUT; u.wr = 1'b1; u.dst = qbase + 7'd2;
        if (cy(ent.node) == cy(ent.parent)) begin
          u.op = ALU_ADD; u.s1 = SRC_IMM; u.i1 = '0;
        end else begin
          u.op = cy(ent.node) ? ALU_ADD : ALU_SUB; u.a1 = MA_FRAC;
        end
      end
      S_Z:    begin
        u.op = ALU_MUL; u.a0 = MA_Z0; u.s1 = SRC_IMM; u.i1 = ONE_FX;
        u.wr = 1'b1; u.dst = qbase + 7'd3;
      end
      S_PEN:  begin
        u.op = ALU_ADD; u.s0 = SRC_IMM; u.i0 = word_t'(ent.pen); u.s1 = SRC_IMM; u.i1 = '0;
        u.wr = 1'b1; u.dst = qbase;
      end
      S_COUNT: begin
        u.op = ALU_ADD; u.s0 = SRC_IMM; u.i0 = word_t'(coord_count); u.s1 = SRC_IMM; u.i1 = '0;
        u.wr = 1'b1; u.dst = MA_COUNT;
      end
      default: ;
    endcase
  end

  assign busy = (step != S_IDLE);

  // Memory port and ALU start.
  always_comb begin
    mem_we    = 1'b0;
    mem_addr  = u.a0;
    mem_wdata = alu_out[WORD-1:0];
    unique case (phase)
      P_B:     mem_addr = u.a1;
      P_E:     begin mem_addr = u.dst; mem_we = busy && u.wr && alu_done; end
      default: mem_addr = u.a0;
    endcase
  end
  assign alu_start = busy && (phase == P_D);
  assign alu_op    = u.op;

  logic gt, le;
  assign gt = !flag_borrow && !flag_zero;
  assign le = flag_borrow || flag_zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step        <= S_IDLE;
      phase       <= P_A;
      idx         <= '0;
      pos         <= '0;
      root        <= '0;
      cfg         <= '0;
      coord_count <= '0;
      alu_in0     <= '0;
      alu_in1     <= '0;
    end else if (step == S_IDLE) begin
      phase <= P_A;
      if (start) begin
        step        <= S_MAX;
        idx         <= 2'd1;
        root        <= 2'd0;
        cfg         <= 2'b00;
        pos         <= '0;
        coord_count <= '0;
      end
    end else begin
      unique case (phase)
        P_A: phase <= P_B;
        P_B: begin
          phase <= P_C;
          unique case (u.s0)
            SRC_RAM: alu_in0 <= {{WORD{1'b0}}, mem_rdata};
            SRC_IMM: alu_in0 <= {{WORD{1'b0}}, u.i0};
            default: alu_in0 <= alu_out;
          endcase
        end
        P_C: begin
          phase <= P_D;
          unique case (u.s1)
            SRC_RAM: alu_in1 <= mem_rdata;
            SRC_IMM: alu_in1 <= u.i1;
            default: alu_in1 <= alu_out[WORD-1:0];
          endcase
        end
        P_D: phase <= P_E;
        default: if (alu_done) begin
          phase <= P_A;
          unique case (step)
            S_MAX: begin
              if (gt) root <= idx;
              idx <= idx + 2'd1;
              if (idx == 2'd3) step <= S_E1;
            end
            S_E1: begin
              cfg[0] <= gt;
              step   <= S_E2;
            end
            S_E2: begin
              cfg[1] <= gt;
              step   <= S_NODE;
            end
            S_NODE: begin
              if (le) step <= (pos == 3'd0) ? S_COUNT : S_DEN;
              else if (pos == 3'd5) step <= S_COUNT;
              else pos <= pos + 3'd1;
            end
            S_PEN: begin
              coord_count <= coord_count + 3'd1;
              if (ent.next == POS_DONE) step <= S_COUNT;
              else begin
                pos  <= ent.next;
                step <= S_NODE;
              end
            end
            S_COUNT: step <= S_IDLE;
            default: step <= step_e'(step + 5'd1);
          endcase
        end
      endcase
    end
  end

  // A 2x2 subgrid yields at most four coordinates.
  a_max_coords: assert property (@(posedge clk) disable iff (!rst_n) coord_count <= 3'd4);

endmodule
