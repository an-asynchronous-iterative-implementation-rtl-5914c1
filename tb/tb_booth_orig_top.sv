// tb_booth_orig_top: end-to-end test of the top level at its default size
// (16 x 16 bit), both multipliers running at the same time on independent
// operand streams. Every product is checked against the '*' operator and every
// iteration count against a bit-serial count of Booth operations. The test
// also counts how often each mechanism of the design was exercised and fails
// if one never was: add, subtract, the first iteration without an operation,
// the look-ahead (isolated bit) rule in each multiplier, shifts by more than
// one place, a one-iteration multiplication (multiplier 0 or -1), the
// worst-case N/2-operation pattern, the CPA_low carry inserted from the
// previous iteration, and the final CPA_high step of the carry-save unit.
module tb_booth_orig_top;
  import booth_pkg::*;
  import booth_ref_pkg::*;
  localparam int unsigned N  = N_DEFAULT;
  localparam int unsigned CW = $clog2(N + 1);
  localparam int NUM_OPS = 2000;

  logic clk = 0, rst_n = 0;
  logic           cpa_start = 0, csa_start = 0;
  logic [N-1:0]   cpa_md = '0, cpa_mr = '0, csa_md = '0, csa_mr = '0;
  logic           cpa_busy, cpa_done, csa_busy, csa_done;
  logic [2*N-1:0] cpa_product, csa_product;
  logic [CW-1:0]  cpa_iterations, csa_iterations;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_add = 0, n_sub = 0, n_noop = 0, n_iso_cpa = 0, n_iso_csa = 0;
  int n_longshift = 0, n_one_iter = 0, n_worst = 0, n_carry_ins = 0, n_high = 0;

  always #5 clk = ~clk;

  booth_orig_top dut (
    .clk, .rst_n,
    .cpa_start, .cpa_multiplicand(cpa_md), .cpa_multiplier(cpa_mr),
    .cpa_busy, .cpa_done, .cpa_product, .cpa_iterations,
    .csa_start, .csa_multiplicand(csa_md), .csa_multiplier(csa_mr),
    .csa_busy, .csa_done, .csa_product, .csa_iterations);

  // Observe the datapath decisions of both units.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cpa.busy) begin
      if (dut.u_cpa.op == OP_ADD) n_add++;
      if (dut.u_cpa.op == OP_SUB) n_sub++;
      if (dut.u_cpa.op == OP_NONE) n_noop++;
      if (dut.u_cpa.isolated) n_iso_cpa++;
      if (dut.u_cpa.shift_by > 1 && !dut.u_cpa.last) n_longshift++;
    end
    if (int'(dut.u_csa.state_q) == 1) begin  // S_ITER
      if (dut.u_csa.isolated) n_iso_csa++;
      if (dut.u_csa.cout_q) n_carry_ins++;
    end
    if (int'(dut.u_csa.state_q) == 2) n_high++;  // S_HIGH
  end

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] pick(int i);
    case (i % 16)
      0: return '0;
      1: return '1;
      2: return {N/2{2'b01}};
      3: return {N/2{2'b10}};
      4: return {1'b1, {N-1{1'b0}}};
      default: return N'($urandom);
    endcase
  endfunction

  task automatic cpa_stream();
    for (int i = 0; i < NUM_OPS; i++) begin
      logic [N-1:0] a, b;
      longint e;
      int e_it;
      a = N'($urandom); b = pick(i);
      @(negedge clk); cpa_md = a; cpa_mr = b; cpa_start = 1;
      @(negedge clk); cpa_start = 0;
      while (!cpa_done) @(negedge clk);
      e = longint'($signed(a)) * longint'($signed(b));
      e_it = ref_iterations(longint'(b), N, 1'b1);
      checks += 2;
      if (longint'($signed(cpa_product)) != e) begin
        failures++; $display("FAIL cpa %h*%h = %h exp %h", a, b, cpa_product, e[2*N-1:0]);
      end
      if (int'(cpa_iterations) != e_it) begin
        failures++; $display("FAIL cpa mr=%h iterations %0d exp %0d", b, cpa_iterations, e_it);
      end
      if (cpa_iterations == 1) n_one_iter++;
      if (b == {N/2{2'b01}} && cpa_iterations == CW'(N/2)) n_worst++;
    end
  endtask

  task automatic csa_stream();
    for (int i = 0; i < NUM_OPS; i++) begin
      logic [N-1:0] a, b;
      longint e;
      int e_it;
      a = N'($urandom); b = pick(i + 7);
      @(negedge clk); csa_md = a; csa_mr = b; csa_start = 1;
      @(negedge clk); csa_start = 0;
      while (!csa_done) @(negedge clk);
      e = longint'($signed(a)) * longint'($signed(b));
      e_it = ref_iterations(longint'(b), N, 1'b1);
      checks += 2;
      if (longint'($signed(csa_product)) != e) begin
        failures++; $display("FAIL csa %h*%h = %h exp %h", a, b, csa_product, e[2*N-1:0]);
      end
      if (int'(csa_iterations) != e_it) begin
        failures++; $display("FAIL csa mr=%h iterations %0d exp %0d", b, csa_iterations, e_it);
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      cpa_stream();
      csa_stream();
    join
    need("add", n_add);
    need("subtract", n_sub);
    need("first iteration, no operation", n_noop);
    need("look-ahead (CPA-impr)", n_iso_cpa);
    need("look-ahead (CSA)", n_iso_csa);
    need("shift by more than one", n_longshift);
    need("single-iteration product", n_one_iter);
    need("worst case N/2 operations", n_worst);
    need("CPA_low carry insertion", n_carry_ins);
    need("CPA_high final step", n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
