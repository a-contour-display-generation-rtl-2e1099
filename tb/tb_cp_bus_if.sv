// Testbench of cp_bus_if: three interfaces in a count-enable chain, each
// with its own memory model, wired to a host bus the way the array wires
// its cells. Checks address assignment (values, order, two cycles per cell,
// Count Enable Out), selection, WRITE with the write pointer, LEVEL to all
// cells, READ with its two-cycle latency, and that WRITE/READ are ignored
// while the control section is busy.
module tb_cp_bus_if;
  import cp_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  sysbus_t host, cbus;
  logic cin;
  logic [N:0] chain;
  logic [N-1:0] rv, ric, we, req, st, has, sel;
  word_t rd [N], rdat [N], wd [N];
  logic [6:0] ad [N];
  logic busy_ctl;
  word_t mem [N][128];
  word_t ordata;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  assign chain[0] = cin;
  for (genvar k = 0; k < N; k++) begin : g
    cp_bus_if dut (.clk, .rst_n, .bus(cbus), .cnt_en_in(chain[k]), .cnt_en_out(chain[k+1]),
                   .ret_valid(rv[k]), .ret_is_count(ric[k]), .ret_data(rd[k]),
                   .ctl_busy(busy_ctl), .mem_we(we[k]), .mem_addr(ad[k]), .mem_wdata(wd[k]),
                   .mem_rdata(rdat[k]), .mem_req(req[k]), .start(st[k]), .has_addr(has[k]),
                   .selected(sel[k]));
    always_ff @(posedge clk) begin
      if (we[k] && req[k]) mem[k][ad[k]] <= wd[k];
      rdat[k] <= mem[k][ad[k]];
    end
  end
  always_comb begin
    ordata = '0;
    for (int k = 0; k < N; k++) if (rv[k]) ordata |= rd[k];
  end
  assign cbus.cmd  = host.cmd;
  assign cbus.data = (|ric) ? ordata : host.data;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic issue(cmd_e c, word_t d);
    @(negedge clk); host.cmd = c; host.data = d;
    @(negedge clk); host.cmd = CMD_NOP; host.data = 16'hdead;
  endtask

  // count starts observed on the return path
  int cnt_seen [$];
  int cnt_cyc [$];
  int starts [N];
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) begin
      if (ric[k]) begin cnt_seen.push_back(int'(rd[k])); cnt_cyc.push_back(cyc); end
      if (st[k]) starts[k]++;
    end
  end

  initial begin
    int t0, got;
    host.cmd = CMD_NOP; host.data = 0; cin = 0; busy_ctl = 0;
    foreach (starts[k]) starts[k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk("no address after reset", int'(has), 0);
    // reset and count from base 100
    @(negedge clk); host.cmd = CMD_RESET; host.data = 16'd100; cin = 1;
    @(negedge clk); host.cmd = CMD_NOP; host.data = 16'hdead;
    t0 = cyc;
    while (!chain[N] && cyc < t0 + 50) @(negedge clk);
    chk("count done", int'(chain[N]), 1);
    @(negedge clk);
    chk("cells counted", cnt_seen.size(), N);
    for (int k = 0; k < cnt_seen.size(); k++) chk("address value", cnt_seen[k], 101 + k);
    for (int k = 1; k < cnt_cyc.size(); k++) chk("two cycles per cell", cnt_cyc[k] - cnt_cyc[k-1], 2);
    chk("all addressed", int'(has), 7);
    // select cell 1 (address 102) and write three words
    issue(CMD_ADDR, 16'd102);
    @(negedge clk);
    chk("selection", int'(sel), 2);
    issue(CMD_WRITE, 16'h1111);
    issue(CMD_WRITE, 16'h2222);
    issue(CMD_WRITE, 16'h3333);
    repeat (2) @(negedge clk);
    chk("write 0", int'(mem[1][0]), 16'h1111);
    chk("write 1", int'(mem[1][1]), 16'h2222);
    chk("write 2", int'(mem[1][2]), 16'h3333);
    // writes ignored while busy
    busy_ctl = 1;
    issue(CMD_WRITE, 16'h4444);
    @(negedge clk);
    busy_ctl = 0;
    repeat (2) @(negedge clk);
    chk("busy write ignored", int'(mem[1][3] == 16'h4444), 0);
    // level to every addressed cell
    issue(CMD_LEVEL, 16'd555);
    repeat (2) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      chk("level stored", int'(mem[k][MA_LEVEL]), 555);
      chk("one start", starts[k], 1);
    end
    // read the output area of cell 2
    mem[2][MA_COUNT] = 16'd2; mem[2][MA_COUNT+1] = 16'hbeef; mem[2][MA_COUNT+2] = 16'h1234;
    issue(CMD_ADDR, 16'd103);
    for (int w = 0; w < 3; w++) begin
      @(negedge clk); host.cmd = CMD_READ; host.data = 0; t0 = cyc;
      @(negedge clk); host.cmd = CMD_NOP;
      got = -1;
      while (!(|rv) && cyc < t0 + 10) @(negedge clk);
      chk("read latency", cyc - t0, 2);
      chk("read returns from cell 2 only", int'(rv), 4);
      chk("read word", int'(ordata), (w == 0) ? 2 : (w == 1) ? 16'hbeef : 16'h1234);
    end
    // an unassigned address selects nobody
    issue(CMD_ADDR, 16'd7);
    @(negedge clk);
    chk("no selection", int'(sel), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
