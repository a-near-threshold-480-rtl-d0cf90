`timescale 1ps / 1fs
// tb_phase_comp: self-checking test of the COMP arbiter model.
// Overlapping pulse pairs with in1 first, in2 first, at several separations:
// q must show which rose first (after the decision delay) and hold while both
// inputs are low; qb is its complement; a simultaneous pair keeps the value.
module tb_phase_comp;
  logic in1 = 1'b0, in2 = 1'b0;
  logic q, qb;
  int checks = 0, failures = 0;

  phase_comp #(.T_CQ(5.0)) dut (.in1(in1), .in2(in2), .q(q), .qb(qb));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // first = 1: in1 leads by sep ps; first = 0: in2 leads
  task automatic pair(input bit first, input real sep);
    fork
      begin if (!first) #(sep); in1 = 1'b1; end
      begin if (first)  #(sep); in2 = 1'b1; end
    join
    #20;
    chk(q == first, $sformatf("first=%0d sep=%0.1f q=%0d", first, sep, q));
    chk(qb == !first, "qb is the complement");
    in1 = 1'b0; in2 = 1'b0;
    #200;
    chk(q == first, "holds while inputs low");
  endtask

  initial begin
    #100;
    for (int i = 1; i <= 20; i++) begin
      pair(1'b1, real'(i));
      pair(1'b0, real'(i) * 3.0);
    end
    pair(1'b1, 0.5);
    // simultaneous edges: keep the previous decision
    in1 = 1'b1; in2 = 1'b1; #50;
    chk(q == 1'b1, "tie keeps value");
    in1 = 1'b0; in2 = 1'b0; #50;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
