// tb_cp_adder: checks a + b + cin (mod 2^W) with random and corner operands.
module tb_cp_adder;
  localparam int unsigned W = 18;
  logic [W-1:0] a, b, s;
  logic cin;
  int checks = 0, failures = 0;

  cp_adder #(.W(W)) dut (.a, .b, .cin, .sum(s));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint unsigned e;
      a = (i == 0) ? '1 : W'($urandom);
      b = (i == 0) ? '0 : W'($urandom);
      cin = (i == 0) ? 1'b1 : 1'($urandom);
      #1;
      e = (longint'(a) + longint'(b) + longint'(cin)) % (longint'(1) << W);
      checks++;
      if (longint'(s) != e) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0d got=%h exp=%h", a, b, cin, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
