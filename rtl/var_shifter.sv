// var_shifter: variable arithmetic right shifter built as a multiplexer tree.
//
// Shifts the WIDTH-bit word 'din' right by 'amount' (0 .. 2^SW-1) places,
// filling from the top with the sign bit din[WIDTH-1]. It is built as SW
// levels of 2:1 multiplexers, level k shifting by 2^k when amount[k] is set,
// the classic logarithmic mux tree. Purely combinational.
// That the shifters are multiplexer trees follows the document; the
// logarithmic arrangement is this design's choice.
module var_shifter #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned SW    = 5
) (
  input  logic [WIDTH-1:0] din,
  input  logic [SW-1:0]    amount,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] level [SW+1];

  assign level[0] = din;

  for (genvar k = 0; k < SW; k++) begin : g_level
    localparam int unsigned D = 2 ** k;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i + D < WIDTH) begin : g_in
        assign level[k+1][i] = amount[k] ? level[k][i+D] : level[k][i];
      end else begin : g_sign
        assign level[k+1][i] = amount[k] ? level[k][WIDTH-1] : level[k][i];
      end
    end
  end

  assign dout = level[SW];

endmodule
