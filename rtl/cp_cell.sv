// 2x2 cellular processor.
//
// One cell contours one 2x2 subgrid. It joins the bus interface (External
// Data and Instruction registers, count-enable address chain), the 128-word
// working memory, the ALU with ALU-IN0, ALU-IN1, ALU-OUT and flags, and the
// control section. The memory has one port: the bus interface owns it while
// the control section is idle, the control section while it is busy.
//
// Use: after address assignment, select the cell with ADDR and WRITE seven
// words: the grid values of corners 0..3 (counterclockwise from the lower
// left), x0, y0 (grid position of corner 0) and z0 (sheet coordinate). A
// LEVEL command then makes every addressed cell contour its subgrid; busy
// is high until the cell is done. Select it again and READ: the first word
// is the number n of coordinates (0..4), then n quadruples (pen, x, y, z)
// with pen 1 = setpoint, 0 = drawto, and coordinates with FRAC fraction
// bits.
//
// The blocks and their connections follow the source design's schematic of
// the cell; the microprogrammed control of that schematic is replaced here
// by a hardwired sequencer (see cp_control).
module cp_cell
  import cp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  sysbus_t   bus,
  input  logic      cnt_en_in,
  output logic      cnt_en_out,
  output logic      ret_valid,
  output logic      ret_is_count,
  output word_t     ret_data,
  output logic      busy,
  output logic      has_addr,
  output corner_t   root,
  output logic [1:0] cfg,
  output logic [2:0] coord_count
);

  logic       b_we, c_we, m_we;
  logic [6:0] b_addr, c_addr, m_addr;
  word_t      b_wdata, c_wdata, m_wdata, m_rdata;
  logic       b_req, start, selected;

  logic              alu_start, alu_done, alu_busy;
  alu_op_e           alu_op;
  logic [2*WORD-1:0] alu_in0, alu_out;
  word_t             alu_in1;
  logic              f_zero, f_borrow, f_ovf;

  cp_bus_if u_bus (
    .clk, .rst_n, .bus, .cnt_en_in, .cnt_en_out, .ret_valid, .ret_is_count, .ret_data,
    .ctl_busy(busy), .mem_we(b_we), .mem_addr(b_addr), .mem_wdata(b_wdata),
    .mem_rdata(m_rdata), .mem_req(b_req), .start, .has_addr, .selected
  );

  cp_control u_ctl (
    .clk, .rst_n, .start, .busy,
    .mem_we(c_we), .mem_addr(c_addr), .mem_wdata(c_wdata), .mem_rdata(m_rdata),
    .alu_start, .alu_op, .alu_in0, .alu_in1, .alu_out, .alu_done,
    .flag_zero(f_zero), .flag_borrow(f_borrow),
    .root, .cfg, .coord_count
  );

  cp_alu #(.W(WORD)) u_alu (
    .clk, .rst_n, .start(alu_start), .op(alu_op), .a(alu_in0), .b(alu_in1),
    .result(alu_out), .done(alu_done), .busy(alu_busy),
    .flag_zero(f_zero), .flag_borrow(f_borrow), .flag_ovf(f_ovf)
  );

  always_comb begin
    if (busy) begin
      m_we = c_we; m_addr = c_addr; m_wdata = c_wdata;
    end else begin
      m_we = b_we && b_req; m_addr = b_addr; m_wdata = b_wdata;
    end
  end

  cp_ram #(.DEPTH(128), .WIDTH(WORD)) u_ram (
    .clk, .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

endmodule
