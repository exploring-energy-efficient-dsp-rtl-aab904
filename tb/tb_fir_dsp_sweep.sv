// tb_fir_dsp_sweep: the evaluation workload of the n-multiplier DSP. A
// 100-tap FIR filter runs on 300 random input samples at a 192 kHz sample
// rate from a 49.152 MHz clock (one sample every 256 cycles) for every
// multiplier count n = 1..33 and for n = 64, 110, 128 and 255, each in its
// own fir_dsp instance (through fir_dsp_harness, which checks every output
// value, the output latency of ceil(100/n)+3 cycles after the frame trigger,
// the end of the program and the number of gated clock edges). The
// program length ceil(100/n)+4 is checked against the 256-cycle frame.
// The clock-gated instances (n = 1..33, 64, 110, 128, 255) are followed by
// the same filter on ungated instances for n = 1..33, where the harness
// checks instead that the clock runs every cycle of the frame.
module tb_fir_dsp_sweep;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NG = 37;       // clock-gated instances come first
  localparam int NH = NG + 33;
  localparam int NS [NH] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17,
                             18, 19, 20, 21, 22, 23, 24, 25, 26, 27, 28, 29, 30, 31, 32,
                             33, 64, 110, 128, 255,
                             1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17,
                             18, 19, 20, 21, 22, 23, 24, 25, 26, 27, 28, 29, 30, 31, 32,
                             33};

  logic done   [NH];
  int   checks [NH];
  int   fails  [NH];
  int   wraps  [NH];

  for (genvar h = 0; h < NH; h++) begin : g_n
    fir_dsp_harness #(.NUM_MEM(NS[h]), .TAPS(100), .NFRAMES(300), .FRAME_PERIOD(256), .SEED(100 + h),
                      .CLOCK_GATING(h < NG)) u_h (
      .clk(clk), .done(done[h]), .checks(checks[h]), .failures(fails[h]), .n_wraps(wraps[h]));
  end

  function automatic bit all_done();
    for (int i = 0; i < NH; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic finish(int extra_fail);
    int c, f;
    c = 0; f = extra_fail;
    for (int i = 0; i < NH; i++) begin
      c += checks[i]; f += fails[i];
      // the whole program fits the 256-cycle frame of a 192 kHz sample rate
      c++; if ((100 + NS[i] - 1) / NS[i] + 4 > 256) f++;
      if (fails[i] != 0) $display("n=%0d%s: %0d failures", NS[i], i < NG ? "" : " ungated", fails[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    do @(posedge clk); while (!all_done());
    finish(0);
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    for (int i = 0; i < NH; i++) if (!done[i]) $display("n=%0d%s not finished", NS[i], i < NG ? "" : " ungated");
    finish(1);
  end

endmodule
