// Testbench of cp_cell through its system bus only. One cell is given an
// address by RESET/count, loaded with ADDR and seven WRITEs, started with
// LEVEL and read back with ADDR and READs; results are compared with the
// reference model. Covers the sample 20/50/150/70 subgrid, random
// subgrids, a repeated level change on the same grid, and a READ during
// contouring, which must get no answer.
module tb_cp_cell;
  import cp_pkg::*;
  import tb_contour_model::*;
  logic clk = 0, rst_n = 0;
  sysbus_t bus;
  logic cin, cout, rv, ric, busy, has;
  word_t rdata;
  corner_t root;
  logic [1:0] cfg;
  logic [2:0] ncoord;
  int checks = 0, failures = 0;

  cp_cell dut (.clk, .rst_n, .bus, .cnt_en_in(cin), .cnt_en_out(cout), .ret_valid(rv),
               .ret_is_count(ric), .ret_data(rdata), .busy, .has_addr(has), .root, .cfg,
               .coord_count(ncoord));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic issue(cmd_e c, int d);
    @(negedge clk); bus.cmd = c; bus.data = 16'(d);
    @(negedge clk); bus.cmd = CMD_NOP; bus.data = 16'h5a5a;
  endtask

  task automatic read_word(output int d);
    @(negedge clk); bus.cmd = CMD_READ;
    @(negedge clk); bus.cmd = CMD_NOP;
    @(negedge clk);
    d = rv ? int'(rdata) : -1;
  endtask

  task automatic run(int v[4], int level, int x0, int y0, int z0, bit load);
    result_t r;
    int d;
    r = contour(v, level, x0, y0, z0);
    if (load) begin
      issue(CMD_ADDR, 77);
      for (int i = 0; i < 4; i++) issue(CMD_WRITE, v[i]);
      issue(CMD_WRITE, x0); issue(CMD_WRITE, y0); issue(CMD_WRITE, z0);
    end
    issue(CMD_LEVEL, level);
    @(negedge clk);      // busy rises two cycles after LEVEL
    while (busy) @(negedge clk);
    issue(CMD_ADDR, 77);
    read_word(d); chk("count", d, r.n);
    for (int k = 0; k < r.n; k++) begin
      read_word(d); chk("pen", d, r.pen[k]);
      read_word(d); chk("x", d, r.x[k]);
      read_word(d); chk("y", d, r.y[k]);
      read_word(d); chk("z", d, r.z[k]);
    end
  endtask

  initial begin
    int v[4];
    int d;
    bus.cmd = CMD_NOP; bus.data = 0; cin = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // address assignment: base 76 gives address 77
    @(negedge clk); bus.cmd = CMD_RESET; bus.data = 16'd76; cin = 1;
    @(negedge clk); bus.cmd = CMD_NOP;
    repeat (3) @(negedge clk);
    chk("addressed", int'(has), 1);
    chk("count enable out", int'(cout), 1);
    v = '{20, 50, 150, 70};
    run(v, 100, 1, 1, 2, 1);
    run(v, 50, 1, 1, 2, 0);
    run(v, 10, 1, 1, 2, 0);
    run(v, 150, 1, 1, 2, 0);
    // no answer while contouring
    issue(CMD_LEVEL, 60);
    issue(CMD_ADDR, 77);     // ignored by the busy cell's memory, selection kept
    chk("busy", int'(busy), 1);
    read_word(d); chk("no read while busy", d, -1);
    while (busy) @(negedge clk);
    for (int t = 0; t < 150; t++) begin
      int lim;
      lim = (t % 2) ? 12 : 60000;
      for (int i = 0; i < 4; i++) v[i] = $urandom_range(0, lim);
      run(v, $urandom_range(0, lim), $urandom_range(0, 28), $urandom_range(0, 28), $urandom_range(0, 29), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
