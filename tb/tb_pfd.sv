`timescale 1ps / 1fs
// tb_pfd: self-checking test of the PFD model.
// For reference-leads and feedback-leads offsets, measures the UP and DN pulse
// widths: the leading output must be high for offset + T_RST, the other for
// T_RST (after T_CQ). Frequency detection: with two reference edges before
// a feedback edge, UP must stay high until the feedback edge.
module tb_pfd;
  localparam real T_CQ = 10.0, T_RST = 300.0;
  logic f_ref = 1'b0, f_fb = 1'b0;
  logic up, dn;
  int checks = 0, failures = 0;
  realtime up_r, up_f, dn_r, dn_f;

  pfd #(.T_CQ(T_CQ), .T_RST(T_RST)) dut (.f_ref(f_ref), .f_fb(f_fb), .up(up), .dn(dn));

  always @(posedge up) up_r = $realtime;
  always @(negedge up) up_f = $realtime;
  always @(posedge dn) dn_r = $realtime;
  always @(negedge dn) dn_f = $realtime;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 0.5) && (b - a < 0.5);
  endfunction

  // off > 0: reference leads by off ps
  task automatic edge_pair(input real off);
    realtime t0;
    t0 = $realtime;
    fork
      begin if (off < 0) #(-off); f_ref = 1'b1; end
      begin if (off > 0) #(off);  f_fb  = 1'b1; end
    join
    #2000;
    f_ref = 1'b0; f_fb = 1'b0;
    #2000;
    chk(near(up_r - t0, (off < 0 ? -off : 0.0) + T_CQ), $sformatf("off=%0.1f UP rise", off));
    chk(near(dn_r - t0, (off > 0 ?  off : 0.0) + T_CQ), $sformatf("off=%0.1f DN rise", off));
    chk(near(up_f - up_r, T_RST + (off > 0 ? off : 0.0)), $sformatf("off=%0.1f UP width %0.1f", off, up_f - up_r));
    chk(near(dn_f - dn_r, T_RST + (off < 0 ? -off : 0.0)), $sformatf("off=%0.1f DN width %0.1f", off, dn_f - dn_r));
    chk(!up && !dn, "both low after reset");
  endtask

  initial begin
    #1000;
    chk(!up && !dn, "idle low");
    edge_pair(120.0);
    edge_pair(-75.0);
    edge_pair(3.0);
    edge_pair(-1000.0);
    for (int i = 0; i < 10; i++) edge_pair(real'($urandom_range(0, 3000)) - 1500.0);
    // frequency detection: two reference edges, then the feedback edge
    f_ref = 1'b1; #1000 f_ref = 1'b0; #1000 f_ref = 1'b1; #1000 f_ref = 1'b0; #1000;
    chk(up && !dn, "UP held over a missing feedback edge");
    f_fb = 1'b1; #(T_CQ + T_RST + 50.0);
    chk(!up && !dn, "cleared after the feedback edge");
    f_fb = 1'b0; #1000;
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
