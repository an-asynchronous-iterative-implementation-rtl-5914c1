// cpa_low: variable-width carry-propagate adder (CPA_low) of the carry-save
// Booth multiplier.
//
// After each shift, the bits shifted out of the carry-save pair sit in the top
// 'width' places of the N-bit low word. This adder turns them into ordinary
// product bits. It is an N-bit carry-ripple adder in which
//   * the carry-word input of every bit below N-width is masked to 0 by an AND
//     gate, so those bits (earlier product bits and unconsumed multiplier bits)
//     of 'a_in' pass through unchanged, and
//   * the carry left over from the previous iteration, 'cin', is inserted with
//     an OR into the ripple chain at bit N-width.
// 'cout' is the carry out of bit N-1; it belongs to the next, higher part of
// the product and is kept in a register outside. 'width' is 1..N, so the
// longest possible ripple equals the number of bits shifted in this iteration.
// Purely combinational. The AND masking, the OR carry insertion and the ripple
// organisation follow the document's figure of this adder.
module cpa_low #(
  parameter int unsigned N  = 16,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  a_in,    // low word of the shifted sum word
  input  logic [N-1:0]  b_in,    // low word of the shifted carry word
  input  logic [CW-1:0] width,   // number of bits shifted in (shift_by)
  input  logic          cin,     // carry kept from the previous iteration
  output logic [N-1:0]  sum,
  output logic          cout
);

  logic [N:0]   c;      // ripple carries out of bit i-1 (c[0] = 0)
  logic [N-1:0] ci;     // carry into bit i, after the insertion OR
  logic [N-1:0] b_m;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_bit
    assign b_m[i]   = b_in[i] & (i >= N - 32'(width));
    assign ci[i]    = c[i] | (cin & (i == N - 32'(width)));
    assign sum[i]   = a_in[i] ^ b_m[i] ^ ci[i];
    assign c[i+1]   = (a_in[i] & b_m[i]) | (a_in[i] & ci[i]) | (b_m[i] & ci[i]);
  end

  assign cout = c[N];

endmodule
