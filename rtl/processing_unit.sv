// processing_unit: the floating-point arithmetic unit of the simulator.
//
// Adds, subtracts or multiplies two IEEE-754 single-precision operands read
// from the data memory, or passes operand a through. The document specifies
// a floating-point unit for sums and products; the one-cycle registered
// datapath (a combinational adder and multiplier, see fp_add and fp_mul)
// is this design's own choice.
// Timing: operands and op are sampled with start = 1; result is valid with
// done = 1 on the following cycle.
module processing_unit
  import dtpim_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  pu_op_t op,
  input  word_t  a,
  input  word_t  b,
  output word_t  result,
  output logic   done
);
  word_t sum, prod;

  fp_add u_add (.a(a), .b(b), .sub(op == PU_SUB), .y(sum));
  fp_mul u_mul (.a(a), .b(b), .y(prod));

  always_ff @(posedge clk) begin
    if (rst) begin
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        unique case (op)
          PU_ADD, PU_SUB: result <= sum;
          PU_MUL:         result <= prod;
          default:        result <= a;
        endcase
      end
    end
  end
endmodule
