// tb_csa_row: checks sum + carry == a + b + c + cin (mod 2^W), that carry
// bit 0 is cin, and that the signed sum is exact when the inputs have two
// equal sign bits.
module tb_csa_row;
  localparam int unsigned W = 18;
  logic [W-1:0] a, b, c, s, cy;
  logic cin;
  int checks = 0, failures = 0;

  csa_row #(.W(W)) dut (.a, .b, .c, .cin, .sum(s), .carry(cy));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint e, got;
      a = W'($signed(17'($urandom)));
      b = W'($signed(17'($urandom)));
      c = W'($signed(17'($urandom)));
      cin = 1'($urandom);
      #1;
      e   = longint'($signed(a)) + longint'($signed(b)) + longint'($signed(c)) + longint'(cin);
      got = longint'($signed(s)) + longint'($signed(cy));
      checks++;
      if (got != e || cy[0] != cin) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h cin=%0d got=%0d exp=%0d", a, b, c, cin, got, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
