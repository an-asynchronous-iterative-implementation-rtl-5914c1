// booth_csa_mult: iterative original-Booth multiplier with carry-save addition
// and look-ahead scan ("CSA").
//
// Same algorithm as booth_cpa_mult, but the partial product is kept as a
// carry-save pair {carry, sum}, so the addition in each iteration is a single
// row of 3:2 adders whose delay does not depend on the data. Each iteration
//   1. the scan circuit (with look-ahead) gives the operation at bit 0 and
//      shift_by;
//   2. the CSA row adds the (possibly inverted) multiplicand to {carry, sum};
//      the +1 of a subtraction enters at bit 0 of the new carry word. That
//      bit is always shifted out in the same iteration and lands on the
//      lowest bit of the field CPA_low adds, so it amounts to feeding neg
//      into CPA_low, as the block diagram of this design draws it;
//   3. two shifters (one per word, the carry-save form doubles them) shift
//      {sum, multiplier register} and {carry, 0} right by shift_by;
//   4. CPA_low, a variable-width ripple adder, adds the shift_by bits that
//      were shifted out of the two words, plus the carry kept from the previous
//      iteration, and writes the resolved product bits into the top of the
//      multiplier register; its carry out is kept in the c_out register.
// After the iteration that finds no further discontinuity, one more cycle is
// spent in CPA_high, which adds sum + carry + c_out to give the upper half of
// the product (the lower half is the multiplier register).
// The words are N+2 bits wide: every input of the CSA row then has two equal
// sign bits, which makes the signed sum of the pair exact, and the arithmetic
// shifts of the two words keep it exact (the carry between their low parts is
// the CPA_low carry).
//
// Interface and timing: clocked, one iteration per cycle, plus one cycle for
// CPA_high. 'start' is accepted when 'busy' is low. 'done' is high for one
// cycle with 'product' and 'iterations' (the scan iterations, not counting the
// CPA_high cycle). The document's design is self-timed with bundled data; the
// clocked control, reset and word widths are this design's choices.
module booth_csa_mult
  import booth_pkg::*;
#(
  parameter int unsigned N         = N_DEFAULT,
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
  output logic [CW-1:0]   iterations
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_HIGH} state_e;
  state_e state_q;

  logic [W-1:0]  sum_q, car_q;
  logic [N-1:0]  mr_q;
  logic [N-1:0]  md_q;
  logic          run_q;
  logic          cout_q;
  logic [CW-1:0] rem_q;
  logic [CW-1:0] iter_q;

  booth_op_e      op;
  logic           isolated, last, run_nx, neg;
  logic [CW-1:0]  shift_by;
  logic [W-1:0]   operand, csa_s, csa_c;
  logic [W+N-1:0] sh_s, sh_c;
  logic [N-1:0]   low_sum;
  logic           low_cout;
  logic [W-1:0]   high_sum;   // only bits N-1:0 are product bits (the rest is sign)

  booth_scan #(.N(N), .LOOKAHEAD(1'b1)) u_scan (
    .m(mr_q), .rem(rem_q), .run_bit(run_q),
    .op(op), .isolated(isolated), .shift_by(shift_by), .last(last),
    .run_bit_nx(run_nx)
  );

  booth_operand #(.N(N), .W(W)) u_operand (
    .multiplicand(md_q), .op(op), .operand(operand), .neg(neg)
  );

  csa_row #(.W(W)) u_csa (
    .a(sum_q), .b(car_q), .c(operand), .cin(neg), .sum(csa_s), .carry(csa_c)
  );

  var_shifter #(.WIDTH(W + N), .SW(CW)) u_shift_sum (
    .din({csa_s, mr_q}), .amount(shift_by), .dout(sh_s)
  );

  var_shifter #(.WIDTH(W + N), .SW(CW)) u_shift_car (
    .din({csa_c, {N{1'b0}}}), .amount(shift_by), .dout(sh_c)
  );

  cpa_low #(.N(N)) u_cpa_low (
    .a_in(sh_s[N-1:0]), .b_in(sh_c[N-1:0]), .width(shift_by), .cin(cout_q),
    .sum(low_sum), .cout(low_cout)
  );

  cp_adder #(.W(W)) u_cpa_high (
    .a(sum_q), .b(car_q), .cin(cout_q), .sum(high_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      sum_q      <= '0;
      car_q      <= '0;
      mr_q       <= '0;
      md_q       <= '0;
      run_q      <= 1'b0;
      cout_q     <= 1'b0;
      rem_q      <= '0;
      iter_q     <= '0;
      done       <= 1'b0;
      product    <= '0;
      iterations <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          sum_q   <= '0;
          car_q   <= '0;
          mr_q    <= multiplier;
          md_q    <= multiplicand;
          run_q   <= 1'b0;
          cout_q  <= 1'b0;
          rem_q   <= CW'(N);
          iter_q  <= '0;
          state_q <= S_ITER;
        end
        S_ITER: begin
          sum_q   <= sh_s[W+N-1:N];
          car_q   <= sh_c[W+N-1:N];
          mr_q    <= low_sum;
          cout_q  <= low_cout;
          run_q   <= run_nx;
          rem_q   <= rem_q - shift_by;
          iter_q  <= iter_q + 1'b1;
          if (last) state_q <= S_HIGH;
        end
        S_HIGH: begin
          product    <= {high_sum[N-1:0], mr_q};
          iterations <= iter_q;
          done       <= 1'b1;
          state_q    <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // The look-ahead only fires on a bit that has an operation.
  a_isolated_op: assert property (@(posedge clk) disable iff (!rst_n)
    isolated |-> op != OP_NONE);
  a_shift_range: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_ITER |-> (shift_by >= 1 && shift_by <= rem_q));
  a_iter_bound: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_ITER |-> iter_q <= CW'(N / 2));

endmodule
