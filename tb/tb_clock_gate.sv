// tb_clock_gate: self-checking test of the clock gating cell. The enable
// is changed at random both while the clock is low (takes effect at the
// next rising edge) and while it is high (must not affect the current
// pulse). Each rising edge of clk must produce a rising edge of gclk exactly
// when the enable was high just before that edge, gclk must be low whenever
// clk is low, and a pulse must never be cut short.
module tb_clock_gate;

  logic clk = 1'b0, en = 1'b0, gclk;
  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  int checks = 0, failures = 0, gedges = 0, n_on = 0, n_off = 0;
  always @(posedge gclk) gedges++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    bit en_at_edge;
    int e0;
    for (int n = 0; n < 2000; n++) begin
      // low phase
      #2 en = 1'($urandom);
      #3;
      en_at_edge = en;
      e0 = gedges;
      clk = 1'b1;               // rising edge
      #1;
      chk(gedges == e0 + int'(en_at_edge), "gated edge iff enabled");
      chk(gclk == en_at_edge, "gclk level in high phase");
      if (en_at_edge) n_on++; else n_off++;
      #1 en = 1'($urandom);     // change while high: no effect now
      #1;
      chk(gclk == en_at_edge, "enable change while high ignored");
      #2 clk = 1'b0;
      #1;
      chk(gclk == 1'b0, "gclk low while clk low");
    end
    chk(n_on > 0 && n_off > 0, "both enabled and gated cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
