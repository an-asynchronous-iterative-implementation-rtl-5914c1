// booth_scan: the "scan" circuit of the original-Booth multipliers.
//
// Looks at the multiplier bits not yet consumed (m[rem-1:0], LSB first) and at
// the last bit already consumed (run_bit, 0 before the first iteration). It
// decides the operation for the current bit position 0 and how far the
// partial product must be shifted so that the next discontinuity lands on
// bit position 0 for the next iteration:
//   * op = ADD/SUB if m[0] differs from run_bit (1->0 adds, 0->1 subtracts),
//     NONE otherwise (this only happens in the first iteration).
//   * Look-ahead (LOOKAHEAD=1): if there is an operation at bit 0 and the
//     look-ahead bit m[1] differs again from m[0], the bit is isolated. The
//     discontinuity at bit 1 is ignored and the operation is the inverse of the
//     normal one (a lone 1 in a run of 0s is a single add, a lone 0 in a run of
//     1s a single subtract); the run bit then stays the same. This bounds the
//     number of add/sub operations to ceil(N/2).
//   * shift_by is the distance to the next discontinuity (searched from bit 1,
//     or bit 2 after an isolated bit), or rem if there is none left, in which
//     case 'last' is set: the shift then also aligns the final product.
// Bits at and above rem hold product bits and are ignored; the multiplier is
// two's complement, so it is treated as sign-extended with m[rem-1].
// Purely combinational. The look-ahead rule is the document's; the
// interface (rem, run_bit) and the priority search are this design's choice.
module booth_scan
  import booth_pkg::*;
#(
  parameter int unsigned N         = N_DEFAULT,
  parameter bit          LOOKAHEAD = 1'b1,
  localparam int unsigned CW       = $clog2(N + 1)
) (
  input  logic [N-1:0]  m,          // multiplier register, unconsumed bits at the bottom
  input  logic [CW-1:0] rem,        // number of unconsumed multiplier bits, 1..N
  input  logic          run_bit,    // last consumed multiplier bit
  output booth_op_e     op,         // operation at bit 0
  output logic          isolated,   // look-ahead fired
  output logic [CW-1:0] shift_by,   // 1..rem
  output logic          last,       // no discontinuity left: this is the final iteration
  output logic          run_bit_nx  // run bit after this iteration
);

  logic [N:0] ext;    // unconsumed bits, sign-extended above rem
  logic       disc0;
  logic [CW-1:0] start;

  always_comb begin
    for (int unsigned j = 0; j <= N; j++) begin
      if (j < 32'(rem)) ext[j] = m[j];
      else              ext[j] = m[32'(rem) - 1];
    end
  end

  always_comb begin
    disc0    = ext[0] ^ run_bit;
    isolated = LOOKAHEAD && disc0 && (ext[1] != ext[0]);
    if (!disc0)                  op = OP_NONE;
    else if (ext[0] ^ isolated)  op = OP_SUB;   // 0->1 boundary, or a lone 0
    else                         op = OP_ADD;   // 1->0 boundary, or a lone 1
    start = isolated ? CW'(2) : CW'(1);

    // Priority search for the lowest boundary at or above 'start'.
    shift_by = rem;
    last     = 1'b1;
    for (int j = N - 1; j >= 1; j--) begin
      if (CW'(j) >= start && CW'(j) < rem && ext[j] != ext[j-1]) begin
        shift_by = CW'(j);
        last     = 1'b0;
      end
    end
    run_bit_nx = isolated ? run_bit : ext[0];
  end

endmodule
