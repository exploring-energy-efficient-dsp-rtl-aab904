// tb_fir_parallel: self-checking test of the fully parallel variable-tap
// FIR at its full size (256 positions).
//
// Runs, in order: 100 taps (injection position 99) for 300 samples from
// reset; a switch to 8 taps with new coefficients; 256 taps; 1 tap. After a
// switch the delay line still holds samples spaced for the old length, so
// the first new-length outputs are not checked (a warm-up of one filter
// length), then every output is compared with
//   y = sum_{i<N} c_i * x[n-i]     (truncated Q1.31 products, wrapping sum)
// computed from the sample history the testbench keeps. Between frames the
// sample input changes with frame low, and the output must then follow the
// new input while the line stays put (no shift without frame). The output is
// combinational: it is checked in the same cycle the sample is presented.
module tb_fir_parallel;
  import fir_dsp_pkg::*;

  localparam int MAXT = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst, frame, coef_we;
  sample_t   sample_in, coef_data, sample_out;
  logic [7:0] inj_pos, coef_addr;

  fir_parallel dut (
    .clk(clk), .rst(rst), .frame(frame), .sample_in(sample_in),
    .inj_pos(inj_pos), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_data(coef_data), .sample_out(sample_out)
  );

  int checks = 0, failures = 0;
  sample_t coef [MAXT];
  sample_t hist [$];   // hist[0] is the most recent sample that was shifted in

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic sample_t model(int ntaps, sample_t x0);
    sample_t y;
    y = fx_mul(coef[0], x0);
    for (int i = 1; i < ntaps; i++)
      y += fx_mul(coef[i], (i - 1 < hist.size()) ? hist[i-1] : sample_t'(0));
    return y;
  endfunction

  task automatic load_coefs(int ntaps);
    // c_i belongs at position p - i, p = ntaps - 1; unused positions 0
    for (int k = 0; k < MAXT; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 8'(k);
      coef_data = (k <= ntaps - 1) ? coef[ntaps-1-k] : sample_t'(0);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  task automatic run(int ntaps, int nframes, int warmup);
    sample_t x, x2;
    inj_pos = 8'(ntaps - 1);
    for (int f = 0; f < nframes; f++) begin
      @(negedge clk);
      // sample presented without frame: output follows, line must not move
      x2 = sample_t'($urandom);
      sample_in = x2; frame = 1'b0;
      #1;
      if (f >= warmup) check(sample_out == model(ntaps, x2), $sformatf("no-frame output, N=%0d f=%0d", ntaps, f));
      @(negedge clk);
      x = sample_t'($urandom);
      sample_in = x; frame = 1'b1;
      #1;
      if (f >= warmup) check(sample_out == model(ntaps, x), $sformatf("N=%0d f=%0d got %h want %h", ntaps, f, sample_out, model(ntaps, x)));
      @(posedge clk);
      hist.push_front(x);
      if (hist.size() > MAXT) void'(hist.pop_back());
      @(negedge clk);
      frame = 1'b0;
    end
  endtask

  int switches = 0;

  initial begin
    rst = 1; frame = 0; coef_we = 0; sample_in = '0; inj_pos = 8'd99;
    coef_addr = '0; coef_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // the history before the first sample is zero (cleared line)
    for (int i = 0; i < MAXT; i++) hist.push_back('0);

    for (int i = 0; i < MAXT; i++) coef[i] = sample_t'($urandom);
    load_coefs(100);
    run(100, 300, 0);

    for (int i = 0; i < MAXT; i++) coef[i] = sample_t'($urandom);
    load_coefs(8);  switches++;
    run(8, 60, 8);

    for (int i = 0; i < MAXT; i++) coef[i] = sample_t'($urandom);
    load_coefs(256); switches++;
    run(256, 290, 256);

    for (int i = 0; i < MAXT; i++) coef[i] = sample_t'($urandom);
    load_coefs(1);  switches++;
    run(1, 20, 1);

    checks++; if (switches != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
