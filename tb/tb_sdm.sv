`timescale 1ps / 1fs
// tb_sdm: self-checking test of the 4-bit first-order sigma-delta modulator.
// A reference accumulator in the testbench predicts the register and the
// carry on every clock for random inputs. For each constant input value the
// testbench also checks the rate: over 16 clocks the carry is high exactly
// `in` times, i.e. the mean dither equals in/16.
module tb_sdm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] in = '0;
  logic carry;
  logic [3:0] acc;
  int checks = 0, failures = 0;
  int ref_acc;

  sdm dut (.clk(clk), .rst_n(rst_n), .in(in), .carry(carry), .acc(acc));

  always #1042 clk = ~clk;   // ~480 MHz

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int ones;
    repeat (2) @(negedge clk);
    chk(acc == 0, "reset clears register");
    rst_n = 1'b1;
    ref_acc = 0;
    // random inputs: cycle-exact comparison
    for (int i = 0; i < 300; i++) begin
      in = 4'($urandom);
      #1;
      chk(carry == ((ref_acc + int'(in)) > 15), $sformatf("carry i=%0d", i));
      @(posedge clk);
      ref_acc = (ref_acc + int'(in)) % 16;
      @(negedge clk);
      chk(int'(acc) == ref_acc, $sformatf("acc i=%0d got %0d exp %0d", i, acc, ref_acc));
    end
    // rate: 16 clocks of a constant input give `in` carries
    for (int v = 0; v < 16; v++) begin
      in = 4'(v);
      ones = 0;
      repeat (16) begin
        @(negedge clk);
        ones += int'(carry);
      end
      chk(ones == v, $sformatf("rate in=%0d carries=%0d", v, ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
