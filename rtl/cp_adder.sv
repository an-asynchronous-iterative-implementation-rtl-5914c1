// cp_adder: W-bit carry-propagate adder, sum = a + b + cin (mod 2^W).
//
// Used as the n-bit adder of the carry-propagate Booth multiplier and as
// CPA_high, the final adder that merges the carry-save pair and the last
// CPA_low carry of the carry-save Booth multiplier. The document asks for
// CPA_high to be fast; the adder is written as a plain '+' so that synthesis
// can pick a fast structure. Purely combinational.
module cp_adder #(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum
);

  assign sum = a + b + W'(cin);

endmodule
