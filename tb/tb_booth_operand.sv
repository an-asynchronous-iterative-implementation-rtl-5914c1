// tb_booth_operand: checks that operand + neg equals 0, +multiplicand or
// -multiplicand (as an (N+2)-bit signed number) for NONE, ADD and SUB.
module tb_booth_operand;
  import booth_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned W = N + 2;
  logic [N-1:0] mcand;
  booth_op_e    op;
  logic [W-1:0] operand;
  logic         neg;
  int checks = 0, failures = 0;

  booth_operand #(.N(N), .W(W)) dut (.multiplicand(mcand), .op, .operand, .neg);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint a, e, got;
      mcand = (i < 3) ? N'(16'h8000 >> i) : N'($urandom);
      op    = booth_op_e'(i % 3);
      #1;
      a = longint'($signed(mcand));
      e = (op == OP_ADD) ? a : (op == OP_SUB) ? -a : 0;
      got = longint'($signed(operand)) + longint'(neg);
      checks++;
      if (got != e || neg != (op == OP_SUB)) begin
        failures++;
        $display("FAIL mcand=%h op=%s got=%0d exp=%0d", mcand, op.name(), got, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
