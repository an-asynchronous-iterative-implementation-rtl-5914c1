// booth_operand: multiplicand selection and inversion for one Booth operation.
//
// Produces the second adder operand: zero when the scan finds no operation
// (only possible in the first iteration), the sign-extended multiplicand for
// an add, and its bitwise inverse for a subtract. For a subtract the carry-in
// 'neg' is 1, so operand + neg = -multiplicand (two's complement negation done
// by the adder). W >= N+2 keeps -(-2^(N-1)) representable and gives the carry-
// save datapath two equal sign bits. Purely combinational.
// The 0/multiplicand selection and the invert/neg pair follow the block
// diagrams; the widths are this design's choice.
module booth_operand
  import booth_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned W = N + 2
) (
  input  logic [N-1:0] multiplicand,
  input  booth_op_e    op,
  output logic [W-1:0] operand,
  output logic         neg
);

  logic [W-1:0] mcand_ext;

  always_comb begin
    mcand_ext = W'($signed(multiplicand));
    neg       = (op == OP_SUB);
    unique case (op)
      OP_ADD:  operand = mcand_ext;
      OP_SUB:  operand = ~mcand_ext;
      default: operand = '0;
    endcase
  end

endmodule
