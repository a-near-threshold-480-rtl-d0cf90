`timescale 1ps / 1fs
// tb_freq_divider: self-checking test of the divide-by-16 feedback divider.
// Counts input clocks between output edges: each rising output edge must come
// 16 input clocks after the previous one, each falling edge 8 clocks after a
// rising edge (50 % duty), and the output must stay low in reset.
module tb_freq_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clk_div;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, last_fall = -1, rises = 0;

  freq_divider dut (.clk(clk), .rst_n(rst_n), .clk_div(clk_div));

  always #1000 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) cyc++;

  always @(posedge clk_div) begin
    if (last_rise >= 0) chk(cyc - last_rise == 16, $sformatf("rise spacing %0d", cyc - last_rise));
    last_rise = cyc;
    rises++;
  end
  always @(negedge clk_div) if (rst_n) begin
    chk(cyc - last_rise == 8, $sformatf("high time %0d", cyc - last_rise));
    last_fall = cyc;
  end

  initial begin
    repeat (5) @(negedge clk);
    chk(clk_div == 1'b0, "low in reset");
    rst_n = 1'b1;
    repeat (16 * 20) @(negedge clk);
    chk(rises >= 19, $sformatf("rises=%0d", rises));
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
