// tb_mac_unit: self-checking test of the MAC section with 4 lanes and with
// 1 lane. Random operands and random acc_en/outp each cycle; the
// accumulator and output register are compared with a model built from
// products computed here (64-bit product, bits 62..31 kept) and wrapping
// sums. Also checks a known Q1.31 product (0.5 * 0.5 = 0.25) and that each
// case (accumulate, output, hold) occurred.
module tb_mac_unit;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, acc_en, outp;
  logic signed [31:0] x4 [4], y4 [4], x1 [1], y1 [1];
  logic signed [31:0] acc4, sout4, acc1, sout1;

  mac_unit #(.NUM_MEM(4)) d4 (.clk(clk), .rst(rst), .xreg(x4), .yreg(y4), .acc_en(acc_en), .outp(outp), .acc(acc4), .sout(sout4));
  mac_unit #(.NUM_MEM(1)) d1 (.clk(clk), .rst(rst), .xreg(x1), .yreg(y1), .acc_en(acc_en), .outp(outp), .acc(acc1), .sout(sout1));

  int checks = 0, failures = 0, n_acc = 0, n_out = 0, n_hold = 0;
  logic signed [31:0] ma4 = 0, ms4 = 0, ma1 = 0, ms1 = 0;

  function automatic logic signed [31:0] qmul(logic signed [31:0] a, logic signed [31:0] b);
    logic signed [63:0] p;
    p = a * b;             // operands sign-extend to the 64-bit target
    return p[62:31];
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic signed [31:0] s4;
    rst = 1; acc_en = 0; outp = 0;
    foreach (x4[k]) begin x4[k] = 0; y4[k] = 0; end
    x1[0] = 0; y1[0] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    chk(qmul(32'sh4000_0000, 32'sh4000_0000) == 32'sh2000_0000, "0.5*0.5 reference");
    // known value through the hardware: one lane 0.5*0.5, others 0
    x1[0] = 32'sh4000_0000; y1[0] = 32'sh4000_0000; acc_en = 1;
    @(negedge clk);
    acc_en = 0; outp = 1;
    @(negedge clk);
    outp = 0;
    chk(sout1 == 32'sh2000_0000 && acc1 == 0, "0.5*0.5 through MAC");
    ms1 = sout1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      foreach (x4[k]) begin x4[k] = $urandom; y4[k] = $urandom; end
      x1[0] = $urandom; y1[0] = $urandom;
      acc_en = 1'($urandom); outp = ($urandom % 8) == 0;
      s4 = 0;
      foreach (x4[k]) s4 += qmul(x4[k], y4[k]);
      @(posedge clk); #1;
      if (outp) begin ms4 = ma4; ma4 = 0; ms1 = ma1; ma1 = 0; n_out++; end
      else if (acc_en) begin ma4 += s4; ma1 += qmul(x1[0], y1[0]); n_acc++; end
      else n_hold++;
      chk(acc4 == ma4 && sout4 == ms4, "4 lanes");
      chk(acc1 == ma1 && sout1 == ms1, "1 lane");
    end
    chk(n_acc > 0 && n_out > 0 && n_hold > 0, "all cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
