// Cell ALU: unsigned integer add, subtract, multiply and divide.
//
// Operand a is a double word (ALU-IN0 may hold a product), operand b a word
// (ALU-IN1). start begins an operation; done pulses when result and the
// flags are valid. Add, subtract and multiply take one cycle. Divide is a
// restoring divider producing one quotient bit per cycle, 2*W+2 cycles in
// all: it divides the double-word a by b and returns the quotient (its low
// WORD bits; a quotient that does not fit sets ovf). Division by zero
// returns all ones and sets ovf.
//
// Flags: zero (result is 0), borrow (subtract: a < b, unsigned), ovf (add
// carry out of the word, or division overflow).
//
// That the ALU does integer multiplication, division, addition and
// subtraction is from the source design; the widths, the timing and the
// division algorithm are this design's choices.
module cp_alu
  import cp_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  alu_op_e       op,
  input  logic [2*W-1:0] a,
  input  logic [W-1:0]  b,
  output logic [2*W-1:0] result,
  output logic          done,
  output logic          busy,
  output logic          flag_zero,
  output logic          flag_borrow,
  output logic          flag_ovf
);

  logic [2*W-1:0] rem_q;     // {remainder, quotient} shift register
  logic [W:0]     rem;       // partial remainder
  logic [2*W-1:0] quo;       // quotient
  logic [W-1:0]   divisor;
  logic [$clog2(2*W+1)-1:0] cnt;
  logic           div_run;
  logic           div_zero;

  logic [W:0]     trial;
  logic [W:0]     rem_sh;

  // One step of restoring division over the 2W dividend bits.
  always_comb begin
    rem_sh = {rem[W-1:0], rem_q[2*W-1]};
    trial  = rem_sh - {1'b0, divisor};
  end

  logic [W:0]   sum_ext;
  logic [W:0]   dif_ext;
  always_comb begin
    sum_ext = {1'b0, a[W-1:0]} + {1'b0, b};
    dif_ext = {1'b0, a[W-1:0]} - {1'b0, b};
  end

  assign busy = div_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result      <= '0;
      done        <= 1'b0;
      flag_zero   <= 1'b0;
      flag_borrow <= 1'b0;
      flag_ovf    <= 1'b0;
      div_run     <= 1'b0;
      div_zero    <= 1'b0;
      rem         <= '0;
      rem_q       <= '0;
      quo         <= '0;
      divisor     <= '0;
      cnt         <= '0;
    end else begin
      done <= 1'b0;
      if (div_run) begin
        if (cnt == 0) begin
          div_run     <= 1'b0;
          done        <= 1'b1;
          if (div_zero) begin
            result   <= {2*W{1'b1}};
            flag_ovf <= 1'b1;
          end else begin
            result   <= {{W{1'b0}}, quo[W-1:0]};
            flag_ovf <= |quo[2*W-1:W];
          end
          flag_zero   <= (quo == '0) && !div_zero;
          flag_borrow <= 1'b0;
        end else begin
          cnt   <= cnt - 1'b1;
          rem_q <= {rem_q[2*W-2:0], 1'b0};
          if (!trial[W]) begin
            rem <= trial;
            quo <= {quo[2*W-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[2*W-2:0], 1'b0};
          end
        end
      end else if (start) begin
        unique case (op)
          ALU_ADD: begin
            result      <= {{W{1'b0}}, sum_ext[W-1:0]};
            flag_zero   <= sum_ext[W-1:0] == '0;
            flag_borrow <= 1'b0;
            flag_ovf    <= sum_ext[W];
            done        <= 1'b1;
          end
          ALU_SUB: begin
            result      <= {{W{1'b0}}, dif_ext[W-1:0]};
            flag_zero   <= dif_ext[W-1:0] == '0;
            flag_borrow <= dif_ext[W];
            flag_ovf    <= 1'b0;
            done        <= 1'b1;
          end
          ALU_MUL: begin
            result      <= a[W-1:0] * b;
            flag_zero   <= (a[W-1:0] == '0) || (b == '0);
            flag_borrow <= 1'b0;
            flag_ovf    <= 1'b0;
            done        <= 1'b1;
          end
          ALU_DIV: begin
            div_run  <= 1'b1;
            div_zero <= (b == '0);
            divisor  <= b;
            rem      <= '0;
            rem_q    <= a;
            quo      <= '0;
            cnt      <= ($clog2(2*W+1))'(2*W);
          end
          default: ;
        endcase
      end
    end
  end

endmodule
