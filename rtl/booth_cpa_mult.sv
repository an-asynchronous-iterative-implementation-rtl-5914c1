// booth_cpa_mult: iterative original-Booth multiplier with carry-propagate
// addition ("CPA"; with LOOKAHEAD=1 the improved "CPA-impr").
//
// Multiplies two N-bit two's complement numbers. One iteration handles one
// discontinuity of the multiplier, so the number of iterations depends on the
// data: runs of equal multiplier bits cost nothing. Each iteration
//   1. the scan circuit looks at the unconsumed multiplier bits and gives the
//      operation at bit 0 (add, subtract or, in the first iteration only,
//      nothing) and shift_by, the distance to the next discontinuity;
//   2. the adder adds the (possibly inverted, neg as carry-in) multiplicand to
//      the partial-product register;
//   3. the shifter shifts {sum, multiplier register} right by shift_by, sign-
//      filling; the upper part goes back to the partial-product register, the
//      lower part to the multiplier register, where product bits replace the
//      consumed multiplier bits.
// When no discontinuity is left the shift also aligns the product and the
// operation ends: product = {partial product[N-1:0], multiplier register}.
// Iterations = number of add/sub operations, plus one when multiplier bit 0
// is 0 (that first iteration only shifts). At most N/2+1 with look-ahead and
// N without it; 1 for a multiplier of 0 or -1.
//
// Interface and timing: this RTL is clocked, one iteration per clock cycle.
// 'start' is accepted when 'busy' is low; the operands are registered on that
// edge. 'done' is high for one cycle together with 'product' and 'iterations'
// (product holds until the next multiplication ends). The document's design is a
// self-timed bundled-data circuit; the clocked handshake stands in for its
// request/acknowledge control and is this design's choice, as are the reset
// (active low, asynchronous) and the (N+2)-bit partial-product register.
module booth_cpa_mult
  import booth_pkg::*;
#(
  parameter int unsigned N         = N_DEFAULT,
  parameter bit          LOOKAHEAD = 1'b1,
  localparam int unsigned W        = N + 2,
  localparam int unsigned CW       = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [N-1:0]    multiplicand,
  input  logic [N-1:0]    multiplier,
  output logic            busy,
  output logic            done,
  output logic [2*N-1:0]  product,
  output logic [CW-1:0]   iterations   // iterations used by the last multiplication
);

  // Registers (partial product, multiplier, multiplicand, run bit "neg" state).
  logic [W-1:0]  pp_q;
  logic [N-1:0]  mr_q;
  logic [N-1:0]  md_q;
  logic          run_q;
  logic [CW-1:0] rem_q;
  logic [CW-1:0] iter_q;

  // Datapath
  booth_op_e     op;
  logic          isolated, last, run_nx, neg;
  logic [CW-1:0] shift_by;
  logic [W-1:0]  operand, sum;
  logic [W+N-1:0] shifted;

  booth_scan #(.N(N), .LOOKAHEAD(LOOKAHEAD)) u_scan (
    .m(mr_q), .rem(rem_q), .run_bit(run_q),
    .op(op), .isolated(isolated), .shift_by(shift_by), .last(last),
    .run_bit_nx(run_nx)
  );

  booth_operand #(.N(N), .W(W)) u_operand (
    .multiplicand(md_q), .op(op), .operand(operand), .neg(neg)
  );

  cp_adder #(.W(W)) u_adder (
    .a(pp_q), .b(operand), .cin(neg), .sum(sum)
  );

  var_shifter #(.WIDTH(W + N), .SW(CW)) u_shifter (
    .din({sum, mr_q}), .amount(shift_by), .dout(shifted)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_q       <= '0;
      mr_q       <= '0;
      md_q       <= '0;
      run_q      <= 1'b0;
      rem_q      <= '0;
      iter_q     <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      product    <= '0;
      iterations <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          pp_q   <= '0;
          mr_q   <= multiplier;
          md_q   <= multiplicand;
          run_q  <= 1'b0;
          rem_q  <= CW'(N);
          iter_q <= '0;
          busy   <= 1'b1;
        end
      end else begin
        pp_q   <= shifted[W+N-1:N];
        mr_q   <= shifted[N-1:0];
        run_q  <= run_nx;
        rem_q  <= rem_q - shift_by;
        iter_q <= iter_q + 1'b1;
        if (last) begin
          busy       <= 1'b0;
          done       <= 1'b1;
          product    <= shifted[2*N-1:0];
          iterations <= iter_q + 1'b1;
        end
      end
    end
  end

  // The scan never shifts by zero or past the unconsumed bits.
  // The look-ahead only fires on a bit that has an operation.
  a_isolated_op: assert property (@(posedge clk) disable iff (!rst_n)
    isolated |-> op != OP_NONE);
  a_shift_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (shift_by >= 1 && shift_by <= rem_q));
  // With look-ahead no iteration after the first is without an operation,
  // and never more than N/2 + 1 iterations are needed.
  a_iter_bound: assert property (@(posedge clk) disable iff (!rst_n)
    busy && LOOKAHEAD |-> iter_q <= CW'(N / 2 + 1));

endmodule
