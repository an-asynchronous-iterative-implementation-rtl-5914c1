// tb_booth_scan: self-checking test of the scan circuit, with and without
// look-ahead. A bit-serial reference in the testbench walks the unconsumed
// multiplier bits and predicts the operation, shift distance, last flag and
// next run bit; random and corner patterns (0101..., 1010..., all 0/1) are used.
module tb_booth_scan;
  import booth_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  m;
  logic [CW-1:0] rem;
  logic          run_bit;
  booth_op_e     op [2];
  logic          iso [2], last [2], rnx [2];
  logic [CW-1:0] sh [2];
  int checks = 0, failures = 0;
  int iso_seen = 0;

  booth_scan #(.N(N), .LOOKAHEAD(1'b0)) u_plain (
    .m, .rem, .run_bit, .op(op[0]), .isolated(iso[0]), .shift_by(sh[0]),
    .last(last[0]), .run_bit_nx(rnx[0]));
  booth_scan #(.N(N), .LOOKAHEAD(1'b1)) u_la (
    .m, .rem, .run_bit, .op(op[1]), .isolated(iso[1]), .shift_by(sh[1]),
    .last(last[1]), .run_bit_nx(rnx[1]));

  function automatic logic bitx(logic [N-1:0] v, int r, int j);
    return (j < r) ? v[j] : v[r-1];
  endfunction

  task automatic check_one(int la);
    int r = int'(rem);
    booth_op_e e_op;
    logic e_iso, e_last, e_rnx;
    int e_sh, s;
    e_iso = 0;
    if (bitx(m, r, 0) == run_bit) e_op = OP_NONE;
    else begin
      e_op = bitx(m, r, 0) ? OP_SUB : OP_ADD;
      if (la != 0 && bitx(m, r, 1) != bitx(m, r, 0)) begin
        e_iso = 1;
        e_op  = (e_op == OP_SUB) ? OP_ADD : OP_SUB;
      end
    end
    s = e_iso ? 2 : 1;
    e_sh = r; e_last = 1;
    for (int j = s; j < r; j++)
      if (bitx(m, r, j) != bitx(m, r, j-1)) begin e_sh = j; e_last = 0; break; end
    e_rnx = bitx(m, r, e_sh - 1);
    checks++;
    if (op[la] !== e_op || iso[la] !== e_iso || int'(sh[la]) != e_sh ||
        last[la] !== e_last || rnx[la] !== e_rnx) begin
      failures++;
      $display("FAIL la=%0d m=%h rem=%0d rb=%0d: op=%s/%s iso=%0d/%0d sh=%0d/%0d last=%0d/%0d rnx=%0d/%0d",
               la, m, r, run_bit, op[la].name(), e_op.name(), iso[la], e_iso, sh[la], e_sh,
               last[la], e_last, rnx[la], e_rnx);
    end
    if (la == 1 && iso[la]) iso_seen++;
  endtask

  task automatic apply(logic [N-1:0] mv, int r, logic rb);
    m = mv; rem = CW'(r); run_bit = rb;
    #1;
    check_one(0);
    check_one(1);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Corner patterns at full width.
    apply(16'h5555, 16, 0);
    apply(16'hAAAA, 16, 0);
    apply(16'h0000, 16, 0);
    apply(16'hFFFF, 16, 0);
    apply(16'h0001, 16, 0);
    apply(16'h8000, 16, 0);
    // Directed: lone 1 at bit 0 is one add with look-ahead, shift 2.
    m = 16'h0005; rem = CW'(16); run_bit = 0; #1;
    checks++;
    if (op[1] != OP_ADD || sh[1] != 2 || op[0] != OP_SUB || sh[0] != 1) begin
      failures++; $display("FAIL directed lone-1");
    end
    for (int i = 0; i < 20000; i++)
      apply(N'($urandom), 1 + int'($urandom_range(N - 1)), 1'($urandom));
    if (iso_seen == 0) begin failures++; $display("FAIL look-ahead never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
