// tb_xaddr_decoder: self-checking test of the X address decoder for 3
// memories of 86 rows and 4 memories of 64 rows with random inputs. Model:
// rel = (base - mem_pnt) mod DEPTH, memory i reads rel when rd_sel[i] = 0 and
// (rel - 1) mod DEPTH when it is 1; wr_en is one-hot at wr_sel when xwr_en.
module tb_xaddr_decoder;

  logic [6:0] base3, pnt3; logic [2:0] sel3, we3; logic [1:0] ws3; logic [6:0] ra3 [3];
  logic [5:0] base4, pnt4; logic [3:0] sel4, we4; logic [1:0] ws4; logic [5:0] ra4 [4];
  logic       xwr;

  xaddr_decoder #(.NUM_MEM(3)) d3 (.base(base3), .mem_pnt(pnt3), .rd_sel(sel3), .xwr_en(xwr), .wr_sel(ws3), .rd_addr(ra3), .wr_en(we3));
  xaddr_decoder #(.NUM_MEM(4)) d4 (.base(base4), .mem_pnt(pnt4), .rd_sel(sel4), .xwr_en(xwr), .wr_sel(ws4), .rd_addr(ra4), .wr_en(we4));

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int rel, want;
    for (int n = 0; n < 4000; n++) begin
      base3 = 7'($urandom % 86); pnt3 = 7'($urandom % 86); sel3 = 3'($urandom); ws3 = 2'($urandom % 3);
      base4 = 6'($urandom);      pnt4 = 6'($urandom);      sel4 = 4'($urandom); ws4 = 2'($urandom);
      xwr = 1'($urandom);
      if (n < 8) begin base3 = 0; pnt3 = 7'(n); base4 = 0; pnt4 = 6'(n); sel3 = '1; sel4 = '1; end
      #1;
      rel = (int'(base3) - int'(pnt3) + 86) % 86;
      for (int i = 0; i < 3; i++) begin
        want = sel3[i] ? (rel + 85) % 86 : rel;
        chk(int'(ra3[i]) == want, $sformatf("n=3 mem %0d base %0d pnt %0d got %0d want %0d", i, base3, pnt3, ra3[i], want));
        chk(we3[i] == (xwr && int'(ws3) == i), "n=3 wr_en");
      end
      rel = (int'(base4) - int'(pnt4) + 64) % 64;
      for (int i = 0; i < 4; i++) begin
        want = sel4[i] ? (rel + 63) % 64 : rel;
        chk(int'(ra4[i]) == want, $sformatf("n=4 mem %0d", i));
        chk(we4[i] == (xwr && int'(ws4) == i), "n=4 wr_en");
      end
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
