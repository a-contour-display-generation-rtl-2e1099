// Testbench of cp_ram: random writes and reads against a shadow array,
// checking the one-cycle read latency and read-before-write.
module tb_cp_ram;
  logic clk = 0;
  logic we;
  logic [6:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [128];
  logic [127:0] known;
  int checks = 0, failures = 0;

  cp_ram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    logic        exp_known;
    known = '0;
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); we = 1; addr = 7'(i); wdata = 16'($urandom);
      shadow[i] = wdata; known[i] = 1'b1;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr = 7'($urandom);
      wdata = 16'($urandom);
      exp = shadow[addr];
      exp_known = known[addr];
      @(posedge clk); #1;
      if (exp_known) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("FAIL addr %0d read %h expected %h", addr, rdata, exp);
        end
      end
      if (we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
