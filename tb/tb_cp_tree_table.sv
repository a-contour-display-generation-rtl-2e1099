// Testbench of cp_tree_table: for every root corner and tree shape the
// table must match the tree the reference model builds from a grid that
// produces that shape. Also checks the sample tree of the 20/50/150/70
// subgrid: enumeration list 1,2,5,3,4,6 with next node list
// done,3,3,4,done,done.
module tb_cp_tree_table;
  import cp_pkg::*;
  import tb_contour_model::*;
  corner_t root;
  logic [1:0] cfg;
  logic [2:0] pos;
  tree_entry_t entry;
  int checks = 0, failures = 0;

  cp_tree_table dut (.root, .cfg, .pos, .entry);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s root=%0d cfg=%0d pos=%0d got %0d expected %0d", what, root, cfg, pos, got, exp);
    end
  endtask

  initial begin
    result_t r;
    int v[4];
    int seen [4][4];
    int tries;
    foreach (seen[i, j]) seen[i][j] = 0;
    tries = 0;
    while (tries < 5000) begin
      for (int i = 0; i < 4; i++) v[i] = $urandom_range(0, 20);
      r = contour(v, 0, 0, 0, 0);
      root = corner_t'(r.root); cfg = 2'(r.cfg);
      seen[r.root][r.cfg]++;
      for (int p = 0; p < 6; p++) begin
        pos = 3'(p); #1;
        chk("node", int'(entry.node), r.list_node[p]);
        if (p > 0) chk("parent", int'(entry.parent), r.list_par[p]);
        if (p > 0) chk("pen", int'(entry.pen), r.list_pen[p]);
        chk("next", int'(entry.next), r.list_next[p]);
      end
      tries++;
    end
    foreach (seen[i, j]) if (seen[i][j] == 0) begin
      failures++; $display("FAIL root %0d shape %0d never produced", i, j);
    end
    // sample tree: corners 0..3 = 20, 50, 150, 70; root is corner 2
    root = 2'd2; cfg = 2'b10;
    begin
      int enum_corner [6] = '{2, 3, 0, 0, 1, 0};   // nodes 1,2,5,3,4,6
      int next_pos    [6] = '{6, 3, 3, 4, 6, 6};   // done,3,3,4,done,done (as list positions)
      int pen_exp     [6] = '{0, 1, 1, 0, 0, 0};   // setpoint on nodes 2 and 5
      for (int p = 0; p < 6; p++) begin
        pos = 3'(p); #1;
        chk("sample node", int'(entry.node), enum_corner[p]);
        chk("sample next", int'(entry.next), next_pos[p]);
        if (p > 0) chk("sample pen", int'(entry.pen), pen_exp[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
