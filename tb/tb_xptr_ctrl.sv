// tb_xptr_ctrl: self-checking test of the X pointer registers for 4 and 3
// memories (64 and 86 rows) and for a single memory (256 rows). After j
// base increments and w sample writes the registers must satisfy, with
// r = j mod n:
//   rd_sel[i] = (i > r), base = (j div n) mod DEPTH, shft_cnt = (j+1) mod n,
//   wr_sel = w mod n,    wr_ptr = (w div n) mod DEPTH.
// Enough events are applied for every counter to wrap.
module tb_xptr_ctrl;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, inc, wr;

  logic [5:0] b4, p4; logic [3:0] s4; logic [1:0] c4, w4;
  logic [6:0] b3, p3; logic [2:0] s3; logic [1:0] c3, w3;
  logic [7:0] b1, p1; logic [0:0] s1; logic [0:0] c1, w1;

  xptr_ctrl #(.NUM_MEM(4)) d4 (.clk(clk), .rst(rst), .xbase_inc(inc), .xwr_en(wr), .base(b4), .rd_sel(s4), .shft_cnt(c4), .wr_sel(w4), .wr_ptr(p4));
  xptr_ctrl #(.NUM_MEM(3)) d3 (.clk(clk), .rst(rst), .xbase_inc(inc), .xwr_en(wr), .base(b3), .rd_sel(s3), .shft_cnt(c3), .wr_sel(w3), .wr_ptr(p3));
  xptr_ctrl #(.NUM_MEM(1)) d1 (.clk(clk), .rst(rst), .xbase_inc(inc), .xwr_en(wr), .base(b1), .rd_sel(s1), .shft_cnt(c1), .wr_sel(w1), .wr_ptr(p1));

  int checks = 0, failures = 0;
  int j = 0, w = 0;

  function automatic logic [7:0] sel_model(int n, int jj);
    logic [7:0] s;
    s = '0;
    for (int i = 0; i < n; i++) s[i] = (i > jj % n);
    return s;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL j=%0d w=%0d: %s", j, w, what); end
  endtask

  task automatic check_all();
    chk(s4 == sel_model(4, j)[3:0], "rd_sel n=4");
    chk(int'(b4) == (j / 4) % 64, "base n=4");
    chk(int'(c4) == (j + 1) % 4, "shft n=4");
    chk(int'(w4) == w % 4, "wr_sel n=4");
    chk(int'(p4) == (w / 4) % 64, "wr_ptr n=4");
    chk(s3 == sel_model(3, j)[2:0], "rd_sel n=3");
    chk(int'(b3) == (j / 3) % 86, "base n=3");
    chk(int'(c3) == (j + 1) % 3, "shft n=3");
    chk(int'(w3) == w % 3, "wr_sel n=3");
    chk(int'(p3) == (w / 3) % 86, "wr_ptr n=3");
    chk(s1 == 1'b0 && c1 == 1'b0 && w1 == 1'b0, "n=1 constant fields");
    chk(int'(b1) == j % 256, "base n=1");
    chk(int'(p1) == w % 256, "wr_ptr n=1");
  endtask

  initial begin
    rst = 1; inc = 0; wr = 0;
    repeat (2) @(negedge clk);
    rst = 0; #1;
    check_all();
    for (int n = 0; n < 1400; n++) begin
      @(negedge clk);
      inc = 1'($urandom); wr = 1'($urandom);
      @(posedge clk); #1;
      if (inc) j++;
      if (wr) w++;
      check_all();
    end
    chk(j > 300 && w > 300, "enough events to wrap");
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
