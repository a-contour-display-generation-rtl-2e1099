// End-to-end testbench of contour_array at its default size, 29 x 29 cells
// (a 30 x 30 sheet); the array keeps its default parameters.
//
// The testbench acts as the host: it assigns addresses with RESET and the
// count-enable chain (checking the returned addresses 1..N in order),
// loads every cell with its 2x2 subgrid of a random sheet (seven words:
// four corner values counterclockwise from the lower left, x0, y0, z0),
// broadcasts a contour level, waits for busy to fall and reads every
// cell's coordinate count and quadruples, comparing them with the reference
// model. Cell address k (1-based) holds subgrid (row, col) = ((k-1) / COLS,
// (k-1) % COLS). Further levels are then broadcast on the same grid without
// reloading it. Each mechanism must occur at least once: address counting,
// each of the four tree shapes, setpoint and drawto commands, a root at or
// below the level (no coordinate), a saddle (four coordinates), a READ to a
// busy array going unanswered, and a level change. The number of
// coordinates per level is printed and must not exceed four per subgrid.
// Display generation of
// the whole array must end within 2500 cycles of LEVEL, since all subgrids
// are contoured in parallel.
module tb_contour_array_full;
  import cp_pkg::*;
  import tb_contour_model::*;
  localparam int ROWS = 29;
  localparam int COLS = 29;
  localparam int N = ROWS * COLS;
  localparam int LEVELS = 2;
  logic clk = 0, rst_n = 0;
  sysbus_t host;
  logic cin, cout, rv, busy;
  word_t rdata;
  int checks = 0, failures = 0;
  int sheet [ROWS+1][COLS+1];
  int shape_seen [4];
  int n_set = 0, n_draw = 0, n_root_alone = 0, n_saddle = 0, n_counted = 0;
  int n_busy_ignored = 0, n_level_change = 0;
  int max_gen = 0;
  word_t q [$];

  contour_array dut (.clk, .rst_n, .host_bus(host), .count_en_in(cin),
                     .count_en_out(cout), .ret_valid(rv), .ret_data(rdata), .busy);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && rv) q.push_back(rdata);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic put(cmd_e c, int d);
    @(negedge clk); host.cmd = c; host.data = 16'(d);
  endtask

  task automatic idle(int n);
    repeat (n) begin @(negedge clk); host.cmd = CMD_NOP; host.data = 16'h0; end
  endtask

  task automatic corners(int k, output int v[4], output int x0, output int y0);
    int r, c;
    r = k / COLS; c = k % COLS;
    v[0] = sheet[r][c]; v[1] = sheet[r][c+1]; v[2] = sheet[r+1][c+1]; v[3] = sheet[r+1][c];
    x0 = c; y0 = r;
  endtask

  task automatic contour_and_check(int level, int z0);
    int t0, v[4], x0, y0, n, total;
    result_t r;
    total = 0;
    put(CMD_LEVEL, level);
    idle(2);
    t0 = 0;
    // a READ while the array is busy is not answered
    q.delete();
    put(CMD_ADDR, 1); put(CMD_READ, 0); idle(3);
    if (q.size() == 0) n_busy_ignored++;
    t0 = 6;
    while (busy) begin @(negedge clk); t0++; end
    if (t0 > max_gen) max_gen = t0;
    checks++;
    if (t0 > 2500) begin failures++; $display("FAIL display generation took %0d cycles", t0); end
    for (int k = 0; k < N; k++) begin
      corners(k, v, x0, y0);
      r = contour(v, level, x0, y0, z0);
      put(CMD_ADDR, k + 1); idle(1);
      q.delete();
      put(CMD_READ, 0); idle(3);
      n = (q.size() == 1) ? int'(q[0]) : -1;
      chk("count", n, r.n);
      if (n != r.n) continue;
      q.delete();
      for (int w = 0; w < 4 * n; w++) put(CMD_READ, 0);
      idle(3);
      chk("words", q.size(), 4 * n);
      if (q.size() != 4 * n) continue;
      for (int j = 0; j < n; j++) begin
        chk("pen", int'(q[4*j]), r.pen[j]);
        chk("x", int'(q[4*j+1]), r.x[j]);
        chk("y", int'(q[4*j+2]), r.y[j]);
        chk("z", int'(q[4*j+3]), r.z[j]);
        if (r.pen[j] == 1) n_set++; else n_draw++;
      end
      shape_seen[r.cfg]++;
      if (n == 0 && v[r.root] <= level) n_root_alone++;
      if (n == 4) n_saddle++;
      total += n;
    end
    // a sheet yields at most four coordinates per subgrid
    $display("level %0d: %0d coordinates from %0d subgrids (at most %0d)", level, total, N, 4 * N);
    checks++;
    if (total > 4 * N) begin failures++; $display("FAIL more coordinates than 4 per subgrid"); end
  endtask

  task automatic mech(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    int v[4], x0, y0, z0;
    host.cmd = CMD_NOP; host.data = 0; cin = 0;
    foreach (shape_seen[i]) shape_seen[i] = 0;
    for (int r = 0; r <= ROWS; r++)
      for (int c = 0; c <= COLS; c++) sheet[r][c] = $urandom_range(0, 9) * 100;
    // one saddle for certain
    sheet[0][0] = 900; sheet[0][1] = 0; sheet[1][1] = 900; sheet[1][0] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // reset and count
    q.delete();
    put(CMD_RESET, 0); cin = 1; idle(1);
    while (!cout) @(negedge clk);
    idle(2);
    chk("addresses returned", q.size(), N);
    for (int k = 0; k < q.size(); k++) chk("address", int'(q[k]), k + 1);
    n_counted = q.size();
    // grid delivery
    z0 = 7;
    for (int k = 0; k < N; k++) begin
      corners(k, v, x0, y0);
      put(CMD_ADDR, k + 1);
      for (int i = 0; i < 4; i++) put(CMD_WRITE, v[i]);
      put(CMD_WRITE, x0); put(CMD_WRITE, y0); put(CMD_WRITE, z0);
    end
    idle(2);
    contour_and_check(450, z0);
    for (int l = 1; l < LEVELS; l++) begin
      n_level_change++;
      contour_and_check((l % 3 == 0) ? 950 : (l % 3 == 1) ? 150 : 650, z0);
    end
    mech("address counting", n_counted);
    for (int i = 0; i < 4; i++) mech($sformatf("tree shape %0d", i), shape_seen[i]);
    mech("setpoint", n_set);
    mech("drawto", n_draw);
    mech("root at or below level", n_root_alone);
    mech("saddle (4 coordinates)", n_saddle);
    mech("read while busy ignored", n_busy_ignored);
    mech("level change", n_level_change);
    $display("longest display generation %0d cycles", max_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
