// tb_var_shifter: checks the mux-tree shifter against the >>> operator on a
// 34-bit word for every shift amount 0..31 with random data.
module tb_var_shifter;
  localparam int unsigned WIDTH = 34;
  localparam int unsigned SW    = 5;
  logic [WIDTH-1:0] din, dout;
  logic [SW-1:0]    amount;
  int checks = 0, failures = 0;

  var_shifter #(.WIDTH(WIDTH), .SW(SW)) dut (.din, .amount, .dout);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [WIDTH-1:0] e;
      din    = WIDTH'({$urandom, $urandom});
      amount = SW'(i);
      #1;
      e = WIDTH'($signed(din) >>> amount);
      checks++;
      if (dout !== e) begin
        failures++;
        $display("FAIL din=%h amount=%0d got=%h exp=%h", din, amount, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
