// tb_cpa_low: checks the variable-width adder. For width k, the top k bits of
// the result must be a[N-1:N-k] + b[N-1:N-k] + cin (cout the carry out of
// that k-bit sum) and the bits below must be a passed through unchanged,
// whatever b holds there.
module tb_cpa_low;
  localparam int unsigned N  = 16;
  localparam int unsigned CW = $clog2(N + 1);
  logic [N-1:0] a, b, s;
  logic [CW-1:0] k;
  logic cin, cout;
  int checks = 0, failures = 0;

  cpa_low #(.N(N)) dut (.a_in(a), .b_in(b), .width(k), .cin, .sum(s), .cout);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int kk;
      longint unsigned ta, tb_, tsum, lowmask;
      logic [N-1:0] e;
      logic ec;
      kk  = 1 + (i % N);
      a   = N'($urandom);
      b   = N'($urandom);
      cin = 1'($urandom);
      k   = CW'(kk);
      #1;
      ta = longint'(a) >> (N - kk);
      tb_ = longint'(b) >> (N - kk);
      tsum = ta + tb_ + longint'(cin);
      lowmask = (longint'(1) << (N - kk)) - 1;
      e  = N'((tsum << (N - kk)) | (longint'(a) & lowmask));
      ec = tsum[kk];
      checks++;
      if (s !== e || cout !== ec) begin
        failures++;
        $display("FAIL k=%0d a=%h b=%h cin=%0d got=%h/%0d exp=%h/%0d", kk, a, b, cin, s, cout, e, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
