// tb_booth_cpa_mult: end-to-end test of the carry-propagate original-Booth
// multiplier, built twice: with look-ahead (CPA-impr) and without (CPA).
// For corner operands (most negative numbers, 0, -1, the worst-case
// patterns 0101... and 1010...) and random operands it checks the product
// against the '*' operator, the iteration count against a bit-serial count
// of Booth operations, and the latency (one clock per iteration).
module tb_booth_cpa_mult;
  import booth_ref_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned CW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  logic [1:0] start, busy, done;
  logic [N-1:0] md, mr;
  logic [2*N-1:0] product [2];
  logic [CW-1:0]  iters [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    booth_cpa_mult #(.N(N), .LOOKAHEAD(g != 0)) dut (
      .clk, .rst_n, .start(start[g]), .multiplicand(md), .multiplier(mr),
      .busy(busy[g]), .done(done[g]), .product(product[g]), .iterations(iters[g]));
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int g, logic [N-1:0] a, logic [N-1:0] b);
    int lat, e_it;
    longint e;
    @(negedge clk);
    md = a; mr = b; start = '0; start[g] = 1'b1;
    @(posedge clk);                 // start is taken on this edge
    #1 start = '0;
    lat = 0;
    do begin
      @(posedge clk); lat++;
      #1;
    end while (!done[g]);
    e    = longint'($signed(a)) * longint'($signed(b));
    e_it = ref_iterations(longint'(b), N, g != 0);
    checks += 3;
    if (longint'($signed(product[g])) != e) begin
      failures++; $display("FAIL la=%0d %h*%h product %h exp %h", g, a, b, product[g], e[2*N-1:0]);
    end
    if (int'(iters[g]) != e_it) begin
      failures++; $display("FAIL la=%0d mr=%h iterations %0d exp %0d", g, b, iters[g], e_it);
    end
    if (lat != e_it) begin
      failures++; $display("FAIL la=%0d mr=%h latency %0d exp %0d", g, b, lat, e_it);
    end
  endtask

  logic [N-1:0] corners [8] = '{16'h8000, 16'h7FFF, 16'h0000, 16'hFFFF,
                                16'h5555, 16'hAAAA, 16'h0001, 16'h1234};

  initial begin
    start = '0; md = '0; mr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 2; g++) begin
      foreach (corners[i]) foreach (corners[j]) run(g, corners[i], corners[j]);
      for (int i = 0; i < 1500; i++) run(g, N'($urandom), N'($urandom));
    end
    // Worst cases stated for the algorithm: N operations without look-ahead,
    // N/2 with it.
    checks++;
    run(0, 16'h1357, 16'h5555);
    if (iters[0] != CW'(N)) begin failures++; $display("FAIL worst case CPA %0d", iters[0]); end
    checks++;
    run(1, 16'h1357, 16'h5555);
    if (iters[1] != CW'(N / 2)) begin failures++; $display("FAIL worst case CPA-impr %0d", iters[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
