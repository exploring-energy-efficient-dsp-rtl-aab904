// tb_async_ram: self-checking test of the asynchronous-read, synchronous-
// write memory at its default size (256 x 32) and at a depth that is not a
// power of two (86 words, the X/Y memory depth for three memories).
// Checks: every word after a fill pass; a write is visible from the next cycle
// and not before the edge; random write/read traffic against a model array;
// reads beyond the depth return 0 and writes there are dropped.
module tb_async_ram;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic        we_a, we_b;
  logic [7:0]  wa_a, ra_a;
  logic [6:0]  wa_b, ra_b;
  logic [31:0] wd_a, rd_a, wd_b, rd_b;

  async_ram dut_a (.clk(clk), .we(we_a), .waddr(wa_a), .wdata(wd_a), .raddr(ra_a), .rdata(rd_a));
  async_ram #(.DEPTH(86), .WIDTH(32)) dut_b (.clk(clk), .we(we_b), .waddr(wa_b), .wdata(wd_b), .raddr(ra_b), .rdata(rd_b));

  logic [31:0] ma [256];
  logic [31:0] mb [128];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; we_a = 0; we_b = 0; wa_a = 0; ra_a = 0; wa_b = 0; ra_b = 0; wd_a = 0; wd_b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // no reset on the contents: fill both memories first
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we_a = 1; wa_a = 8'(i); wd_a = $urandom; ma[i] = wd_a;
      we_b = 1; wa_b = 7'(i % 128); wd_b = $urandom;
      mb[i % 128] = ((i % 128) < 86) ? wd_b : 32'h0;
    end
    @(negedge clk); we_a = 0; we_b = 0;
    for (int i = 0; i < 256; i++) begin
      ra_a = 8'(i); ra_b = 7'(i % 128); #1;
      check(rd_a == ma[i] && rd_b == mb[i % 128], "filled contents");
    end
    // write visible only after the edge
    @(negedge clk);
    we_a = 1; wa_a = 8'd5; wd_a = 32'hdeadbeef; ra_a = 8'd5; #1;
    check(rd_a == ma[5], "write not visible before edge");
    @(negedge clk);
    we_a = 0; #1;
    check(rd_a == 32'hdeadbeef, "write visible after edge");
    ma[5] = 32'hdeadbeef;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we_a = 1'($urandom); wa_a = 8'($urandom); wd_a = $urandom; ra_a = 8'($urandom);
      we_b = 1'($urandom); wa_b = 7'($urandom); wd_b = $urandom; ra_b = 7'($urandom);
      #1;
      check(rd_a == ma[ra_a], $sformatf("read a @%0d", ra_a));
      check(rd_b == ((ra_b < 86) ? mb[ra_b] : 32'h0), $sformatf("read b @%0d", ra_b));
      @(posedge clk);
      if (we_a) ma[wa_a] = wd_a;
      if (we_b && wa_b < 86) mb[wa_b] = wd_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
