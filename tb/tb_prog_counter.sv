// tb_prog_counter: self-checking test of the program pointer. Random frame
// triggers and end-of-program bits are applied; each cycle the pointer is
// compared with a model: frame -> 0, else end of program -> 255, else stay at
// 255, else +1. Also checks the reset value (255, parked) and counts that
// each case happened.
module tb_prog_counter;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, frame_trig, prog_jump;
  logic [7:0] pc;
  prog_counter dut (.clk(clk), .rst(rst), .frame_trig(frame_trig), .prog_jump(prog_jump), .pc(pc));

  int checks = 0, failures = 0;
  int n_frame = 0, n_jump = 0, n_park = 0, n_inc = 0;
  logic [7:0] model;

  initial begin
    rst = 1; frame_trig = 0; prog_jump = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    checks++; if (pc != 8'd255) failures++;
    model = 8'd255;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      frame_trig = ($urandom % 40) == 0;
      prog_jump  = ($urandom % 30) == 0;
      @(posedge clk); #1;
      if (frame_trig)            begin model = 0;   n_frame++; end
      else if (prog_jump)        begin model = 255; n_jump++;  end
      else if (model == 8'd255)  begin              n_park++;  end
      else                       begin model++;     n_inc++;   end
      checks++;
      if (pc != model) begin failures++; if (failures < 10) $display("FAIL pc=%0d want %0d", pc, model); end
    end
    checks++; if (n_frame == 0 || n_jump == 0 || n_park == 0 || n_inc == 0) failures++;
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
