// Testbench of cp_control, run on the cell's own memory and ALU. The
// testbench loads a subgrid and a level into memory, pulses start and
// compares the coordinate count, the quadruples, the root and the tree
// shape with the reference model. Grids are random, some with many equal
// values; the first cases are the 20/50/150/70 sample subgrid at levels 100
// and 50. Each run must end within 2500 cycles, the per-subgrid cost of the
// display generation step, and every tree shape and every coordinate count
// 0, 2, 3 and 4 must occur.
module tb_cp_control;
  import cp_pkg::*;
  import tb_contour_model::*;
  logic clk = 0, rst_n = 0;
  logic start, busy;
  logic c_we, t_we, m_we;
  logic [6:0] c_addr, t_addr, m_addr;
  word_t c_wdata, t_wdata, m_wdata, m_rdata;
  logic alu_start, alu_done, alu_busy, fz, fb, fo;
  alu_op_e alu_op;
  logic [31:0] alu_in0, alu_out;
  word_t alu_in1;
  corner_t root;
  logic [1:0] cfg;
  logic [2:0] ncoord;
  int checks = 0, failures = 0;
  int shape_seen [4];
  int count_seen [5];
  int max_cycles = 0;

  cp_control dut (.clk, .rst_n, .start, .busy, .mem_we(c_we), .mem_addr(c_addr),
                  .mem_wdata(c_wdata), .mem_rdata(m_rdata), .alu_start, .alu_op,
                  .alu_in0, .alu_in1, .alu_out, .alu_done, .flag_zero(fz), .flag_borrow(fb),
                  .root, .cfg, .coord_count(ncoord));
  cp_alu u_alu (.clk, .rst_n, .start(alu_start), .op(alu_op), .a(alu_in0), .b(alu_in1),
                .result(alu_out), .done(alu_done), .busy(alu_busy), .flag_zero(fz),
                .flag_borrow(fb), .flag_ovf(fo));
  cp_ram u_ram (.clk, .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  assign m_we    = busy ? c_we : t_we;
  assign m_addr  = busy ? c_addr : t_addr;
  assign m_wdata = busy ? c_wdata : t_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  task automatic wr(int a, int d);
    @(negedge clk); t_we = 1; t_addr = 7'(a); t_wdata = 16'(d);
    @(negedge clk); t_we = 0;
  endtask

  task automatic rd(int a, output int d);
    @(negedge clk); t_addr = 7'(a);
    @(negedge clk); d = int'(m_rdata);
  endtask

  task automatic run_case(int v[4], int level, int x0, int y0, int z0);
    result_t r;
    int cyc, d;
    r = contour(v, level, x0, y0, z0);
    for (int i = 0; i < 4; i++) wr(i, v[i]);
    wr(MA_X0, x0); wr(MA_Y0, y0); wr(MA_Z0, z0); wr(MA_LEVEL, level);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    if (cyc > max_cycles) max_cycles = cyc;
    checks++;
    if (cyc > 2500) begin failures++; $display("FAIL run took %0d cycles", cyc); end
    chk("root", int'(root), r.root);
    chk("shape", int'(cfg), r.cfg);
    rd(MA_COUNT, d);
    chk("count", d, r.n);
    for (int k = 0; k < r.n; k++) begin
      rd(MA_OUT + 4*k, d);     chk("pen", d, r.pen[k]);
      rd(MA_OUT + 4*k + 1, d); chk("x", d, r.x[k]);
      rd(MA_OUT + 4*k + 2, d); chk("y", d, r.y[k]);
      rd(MA_OUT + 4*k + 3, d); chk("z", d, r.z[k]);
    end
    shape_seen[r.cfg]++;
    count_seen[r.n]++;
  endtask

  initial begin
    int v[4];
    int d;
    start = 0; t_we = 0; t_addr = 0; t_wdata = 0;
    foreach (shape_seen[i]) shape_seen[i] = 0;
    foreach (count_seen[i]) count_seen[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // sample subgrid, corner values counterclockwise from the lower left
    v = '{20, 50, 150, 70};
    run_case(v, 100, 1, 1, 0);
    // expected by hand: setpoint (1.375, 2), drawto on the diagonal, drawto (2, 1.5)
    rd(MA_COUNT, d);  chk("sample 100 count", d, 3);
    rd(MA_OUT + 0, d); chk("sample 100 pen0", d, 1);
    rd(MA_OUT + 1, d); chk("sample 100 x0", d, 352);
    rd(MA_OUT + 2, d); chk("sample 100 y0", d, 512);
    rd(MA_OUT + 4, d); chk("sample 100 pen1", d, 0);
    rd(MA_OUT + 5, d); chk("sample 100 x1", d, 414);
    rd(MA_OUT + 9, d); chk("sample 100 x2", d, 512);
    rd(MA_OUT + 10, d); chk("sample 100 y2", d, 384);
    run_case(v, 50, 1, 1, 0);
    rd(MA_COUNT, d);  chk("sample 50 count", d, 3);
    rd(MA_OUT + 0, d); chk("sample 50 pen0", d, 1);
    rd(MA_OUT + 1, d); chk("sample 50 x0", d, 256);
    rd(MA_OUT + 2, d); chk("sample 50 y0", d, 410);
    for (int t = 0; t < 400; t++) begin
      int lim, lvl;
      lim = (t % 3 == 0) ? 8 : (t % 3 == 1) ? 1000 : 65535;
      for (int i = 0; i < 4; i++) v[i] = $urandom_range(0, lim);
      lvl = $urandom_range(0, lim);
      run_case(v, lvl, $urandom_range(0, 28), $urandom_range(0, 28), $urandom_range(0, 29));
    end
    // a saddle: two separate segments, four coordinates
    v = '{100, 0, 100, 0};
    run_case(v, 50, 3, 4, 5);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (shape_seen[i] == 0) begin failures++; $display("FAIL tree shape %0d never occurred", i); end
    end
    // a contour that enters a subgrid also leaves it: one coordinate alone
    // cannot occur
    for (int i = 0; i < 5; i++) if (i != 1) begin
      checks++;
      if (count_seen[i] == 0) begin failures++; $display("FAIL count %0d never occurred", i); end
    end
    $display("longest run %0d cycles; shapes %p; counts %p", max_cycles, shape_seen, count_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
