// tb_booth_csa_mult: end-to-end test of the carry-save original-Booth
// multiplier. For corner and random operands it checks the product against
// the '*' operator, the iteration count against a bit-serial count of Booth
// operations (with look-ahead), and the latency: one clock per iteration plus
// one clock for the final carry-propagate adder.
module tb_booth_csa_mult;
  import booth_ref_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned CW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [N-1:0] md, mr;
  logic [2*N-1:0] product;
  logic [CW-1:0]  iters;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  booth_csa_mult #(.N(N)) dut (
    .clk, .rst_n, .start, .multiplicand(md), .multiplier(mr),
    .busy, .done, .product, .iterations(iters));

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [N-1:0] a, logic [N-1:0] b);
    int lat, e_it;
    longint e;
    @(negedge clk);
    md = a; mr = b; start = 1'b1;
    @(posedge clk);                 // start is taken on this edge
    #1 start = 1'b0;
    lat = 0;
    do begin
      @(posedge clk); lat++;
      #1;
    end while (!done);
    e    = longint'($signed(a)) * longint'($signed(b));
    e_it = ref_iterations(longint'(b), N, 1'b1);
    checks += 3;
    if (longint'($signed(product)) != e) begin
      failures++; $display("FAIL %h*%h product %h exp %h", a, b, product, e[2*N-1:0]);
    end
    if (int'(iters) != e_it) begin
      failures++; $display("FAIL mr=%h iterations %0d exp %0d", b, iters, e_it);
    end
    if (lat != e_it + 1) begin
      failures++; $display("FAIL mr=%h latency %0d exp %0d", b, lat, e_it + 1);
    end
  endtask

  logic [N-1:0] corners [8] = '{16'h8000, 16'h7FFF, 16'h0000, 16'hFFFF,
                                16'h5555, 16'hAAAA, 16'h0001, 16'h1234};

  initial begin
    start = 0; md = '0; mr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (corners[i]) foreach (corners[j]) run(corners[i], corners[j]);
    for (int i = 0; i < 3000; i++) run(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
