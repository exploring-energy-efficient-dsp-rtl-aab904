// tb_barrel_shifter: self-checking test of the staged barrel shifter for
// 8 lanes (3 stages, as drawn for the design), 5 lanes (count below 5, not a
// power of two) and 1 lane (no stages). For every count and random data the
// output must be out[k] = in[(k + cnt) mod N].
module tb_barrel_shifter;

  logic [31:0] i8 [8], o8 [8]; logic [2:0] c8;
  logic [31:0] i5 [5], o5 [5]; logic [2:0] c5;
  logic [31:0] i1 [1], o1 [1]; logic [0:0] c1;

  barrel_shifter #(.N(8)) d8 (.din(i8), .cnt(c8), .dout(o8));
  barrel_shifter #(.N(5)) d5 (.din(i5), .cnt(c5), .dout(o5));
  barrel_shifter #(.N(1)) d1 (.din(i1), .cnt(c1), .dout(o1));

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      foreach (i8[k]) i8[k] = $urandom;
      foreach (i5[k]) i5[k] = $urandom;
      i1[0] = $urandom;
      c8 = 3'(n % 8); c5 = 3'(n % 5); c1 = 1'b0;
      #1;
      for (int k = 0; k < 8; k++) chk(o8[k] == i8[(k + int'(c8)) % 8], $sformatf("N=8 cnt=%0d lane %0d", c8, k));
      for (int k = 0; k < 5; k++) chk(o5[k] == i5[(k + int'(c5)) % 5], $sformatf("N=5 cnt=%0d lane %0d", c5, k));
      chk(o1[0] == i1[0], "N=1");
    end
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
