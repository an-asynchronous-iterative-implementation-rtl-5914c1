// csa_row: one row of carry-save (3:2) adders.
//
// Adds three W-bit words into a sum word and a carry word with
// sum + carry = a + b + c (mod 2^W). The carry word is the majority vector
// shifted left by one place; its free bit 0 takes the carry-in 'cin', which
// the Booth datapath uses for the +1 of a subtraction. When all three inputs
// have equal top two bits, the signed values add exactly (no wrap-around).
// Purely combinational. The carry-save adder itself is from the document;
// the use of carry bit 0 for the carry-in is this design's choice.
module csa_row #(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-2:0] maj;   // the majority of the top bit leaves the word

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    carry = {maj, cin};
  end

endmodule
