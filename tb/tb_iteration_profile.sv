// tb_iteration_profile: iteration counts of the original-Booth multipliers
// over three operand classes: uniformly random 16-bit multipliers, small
// integers (|y| < 256) and the alternating worst-case patterns. Each class is
// run on the plain CPA unit, the look-ahead CPA unit and the carry-save unit.
// Every product is checked against '*' and every iteration count against the
// bit-serial reference. The testbench prints the mean iteration count and the
// share of products needing fewer than 5 iterations. Five is the break-even
// point against a radix-4 Booth multiplier in the reference timing: eight
// fixed steps of 1.2 ns plus 0.5 ns, against 2.0 ns per carry-propagate
// iteration. It also checks the worst-case bounds: at most N/2+1 iterations
// with look-ahead, and exactly N for 0101... without it.
// For orientation it also prints the mean latency a self-timed version would
// have with per-iteration times of 2.0 ns (CPA) and 2.1 ns (CPA-impr) against
// 10.1 ns for radix-4 Booth; these times are figures of a reference
// standard-cell implementation, not properties of this RTL.
module tb_iteration_profile;
  import booth_ref_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned CW = $clog2(N + 1);
  localparam int PER_CLASS = 3000;

  logic clk = 0, rst_n = 0;
  logic [2:0] start = '0, busy, done;
  logic [N-1:0] md = '0, mr = '0;
  logic [2*N-1:0] product [3];
  logic [CW-1:0]  iters [3];
  int checks = 0, failures = 0;
  string cls_name [3] = '{"random", "small", "worst"};
  string unit_name [3] = '{"CPA", "CPA-impr", "CSA"};

  always #5 clk = ~clk;

  booth_cpa_mult #(.N(N), .LOOKAHEAD(1'b0)) u_cpa (
    .clk, .rst_n, .start(start[0]), .multiplicand(md), .multiplier(mr),
    .busy(busy[0]), .done(done[0]), .product(product[0]), .iterations(iters[0]));
  booth_cpa_mult #(.N(N), .LOOKAHEAD(1'b1)) u_cpa_impr (
    .clk, .rst_n, .start(start[1]), .multiplicand(md), .multiplier(mr),
    .busy(busy[1]), .done(done[1]), .product(product[1]), .iterations(iters[1]));
  booth_csa_mult #(.N(N)) u_csa (
    .clk, .rst_n, .start(start[2]), .multiplicand(md), .multiplier(mr),
    .busy(busy[2]), .done(done[2]), .product(product[2]), .iterations(iters[2]));

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] operand(int cls);
    case (cls)
      0: return N'($urandom);
      1: return N'($signed(9'($urandom)));                 // -256 .. 255
      default: return ($urandom_range(1) != 0) ? {N/2{2'b01}} : {N/2{2'b10}};
    endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cls = 0; cls < 3; cls++) begin
      int sum_it [3], fast [3], max_it [3];
      sum_it = '{0, 0, 0};
      fast = '{0, 0, 0};
      max_it = '{0, 0, 0};
      for (int i = 0; i < PER_CLASS; i++) begin
        longint e;
        logic [2:0] seen;
        @(negedge clk);
        md = N'($urandom); mr = operand(cls); start = '1;
        @(negedge clk); start = '0;
        seen = done;
        while (seen != 3'b111) begin
          @(negedge clk);
          seen |= done;
        end
        e = longint'($signed(md)) * longint'($signed(mr));
        for (int u = 0; u < 3; u++) begin
          int e_it;
          e_it = ref_iterations(longint'(mr), N, u != 0);
          checks += 2;
          if (longint'($signed(product[u])) != e) begin
            failures++; $display("FAIL %s %h*%h", unit_name[u], md, mr);
          end
          if (int'(iters[u]) != e_it) begin
            failures++; $display("FAIL %s mr=%h iterations %0d exp %0d", unit_name[u], mr, iters[u], e_it);
          end
          sum_it[u] += int'(iters[u]);
          if (iters[u] < 5) fast[u]++;
          if (int'(iters[u]) > max_it[u]) max_it[u] = int'(iters[u]);
        end
      end
      $display("%-7s estimated self-timed latency: CPA %0d ps, CPA-impr %0d ps, radix-4 Booth 10100 ps",
               cls_name[cls], sum_it[0] * 2000 / PER_CLASS, sum_it[1] * 2100 / PER_CLASS);
      for (int u = 0; u < 3; u++)
        $display("%-7s %-9s mean iterations %5.2f  max %0d  below 5: %0d%%",
                 cls_name[cls], unit_name[u], real'(sum_it[u]) / PER_CLASS, max_it[u], fast[u] * 100 / PER_CLASS);
      checks += 2;
      if (max_it[1] > N/2 + 1 || max_it[2] > N/2 + 1) begin
        failures++; $display("FAIL look-ahead bound exceeded in class %s", cls_name[cls]);
      end
      if (cls == 2 && max_it[0] != N) begin
        failures++; $display("FAIL plain CPA worst case %0d, expected %0d", max_it[0], N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
