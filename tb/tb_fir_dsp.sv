// tb_fir_dsp: self-checking test of fir_dsp at several degrees of
// parallelism: NUM_MEM = 1 (single multiplier), 2 (the default), 3 (memory
// depth not a power of two, 86 words) and 4, each running a 100-tap FIR
// over 300 samples, plus NUM_MEM = 5 with 7 taps (taps not a multiple of
// the multiplier count), and NUM_MEM = 3 built without clock gating. See fir_dsp_harness for what is checked. A
// watchdog ends the run with a failure if it does not finish.
module tb_fir_dsp;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 6;
  logic done   [NH];
  int   checks [NH];
  int   fails  [NH];
  int   wraps  [NH];

  fir_dsp_harness #(.NUM_MEM(1), .TAPS(100), .SEED(11)) h1 (.clk(clk), .done(done[0]), .checks(checks[0]), .failures(fails[0]), .n_wraps(wraps[0]));
  fir_dsp_harness #(.NUM_MEM(2), .TAPS(100), .SEED(12)) h2 (.clk(clk), .done(done[1]), .checks(checks[1]), .failures(fails[1]), .n_wraps(wraps[1]));
  fir_dsp_harness #(.NUM_MEM(3), .TAPS(100), .SEED(13)) h3 (.clk(clk), .done(done[2]), .checks(checks[2]), .failures(fails[2]), .n_wraps(wraps[2]));
  fir_dsp_harness #(.NUM_MEM(4), .TAPS(100), .SEED(14)) h4 (.clk(clk), .done(done[3]), .checks(checks[3]), .failures(fails[3]), .n_wraps(wraps[3]));
  fir_dsp_harness #(.NUM_MEM(5), .TAPS(7),   .SEED(15)) h5 (.clk(clk), .done(done[4]), .checks(checks[4]), .failures(fails[4]), .n_wraps(wraps[4]));
  fir_dsp_harness #(.NUM_MEM(3), .TAPS(100), .SEED(16), .CLOCK_GATING(1'b0)) h6 (.clk(clk), .done(done[5]), .checks(checks[5]), .failures(fails[5]), .n_wraps(wraps[5]));

  task automatic finish(int extra_fail);
    int c, f;
    c = 0; f = extra_fail;
    for (int i = 0; i < NH; i++) begin
      c += checks[i]; f += fails[i];
      // the X store must have wrapped at least once in every run
      c++; if (wraps[i] < 1) f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    // polled on the clock: the done flags are only defined once the runs start
    do @(posedge clk); while (!(done[0] && done[1] && done[2] && done[3] && done[4] && done[5]));
    finish(0);
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    finish(1);
  end

endmodule
