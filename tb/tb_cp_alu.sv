// Testbench of cp_alu: random add, subtract, multiply and divide against
// integer arithmetic, including flags and the latency of each operation
// (1 cycle, divide 2*W+2 = 34 cycles).
module tb_cp_alu;
  import cp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start;
  alu_op_e op;
  logic [31:0] a, result;
  logic [15:0] b;
  logic done, busy, fz, fb, fo;
  int checks = 0, failures = 0;

  cp_alu dut (.clk, .rst_n, .start, .op, .a, .b, .result, .done, .busy,
              .flag_zero(fz), .flag_borrow(fb), .flag_ovf(fo));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: op %s a=%h b=%h got %h expected %h", what, op.name(), a, b, got, exp);
    end
  endtask

  initial begin
    logic [31:0] er;
    logic ez, eb, eo;
    int lat, elat;
    start = 0; op = ALU_ADD; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      op = alu_op_e'($urandom_range(0, 3));
      a = $urandom;
      b = 16'($urandom);
      if (t % 7 == 0) b = 16'($urandom_range(0, 3));
      if (t % 5 == 0) a = {16'd0, b};
      if (op != ALU_DIV) a[31:16] = 16'($urandom);  // high half ignored
      unique case (op)
        ALU_ADD: begin er = {16'd0, 16'(a[15:0] + b)}; ez = (16'(a[15:0] + b) == 0);
                       eb = 0; eo = (17'(a[15:0]) + 17'(b)) > 17'h0ffff; elat = 1; end
        ALU_SUB: begin er = {16'd0, 16'(a[15:0] - b)}; ez = (a[15:0] == b);
                       eb = a[15:0] < b; eo = 0; elat = 1; end
        ALU_MUL: begin er = a[15:0] * b; ez = (er == 0); eb = 0; eo = 0; elat = 1; end
        default: begin
          if (b == 0) begin er = 32'hffffffff; ez = 0; eo = 1; end
          else begin er = {16'd0, 16'(a / b)}; ez = (a / b) == 0; eo = (a / b) > 32'h0000ffff; end
          eb = 0; elat = 34;
        end
      endcase
      start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check("result", 64'(result), 64'(er));
      check("zero", 64'(fz), 64'(ez));
      check("borrow", 64'(fb), 64'(eb));
      check("ovf", 64'(fo), 64'(eo));
      check("latency", 64'(lat), 64'(elat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
