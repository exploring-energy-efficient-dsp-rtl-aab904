// fir_dsp_harness: drives one fir_dsp instance through a complete FIR run
// and checks it against a reference model; used by tb_fir_dsp to exercise
// several NUM_MEM settings side by side.
//
// Sequence: reset; load the FIR program (the P+4 word program described in
// fir_dsp, P = ceil(TAPS/NUM_MEM)), the coefficients (c_j in Y memory
// j mod NUM_MEM, row j div NUM_MEM) and a random history into every X
// memory word; then NFRAMES frames of FRAME_PERIOD cycles, each starting
// with a one-cycle frame trigger and a new random sample. More frames than
// the X store holds are run, so the circular addressing wraps.
//
// Reference: the X memories as one circular buffer of NUM_MEM*DEPTH samples
// (sample k at buffer position k mod NUM_MEM*DEPTH), output
// y = sum_i c_i * x[n-i] with truncated Q1.31 products and wrapping sums.
// Full-range random values are fine because the wrap-around arithmetic is
// exact modulo 2^32.
//
// Checks per frame: the output register still holds the previous output
// P+2 cycles after the trigger and the new one P+3 cycles after it (the
// latency), the value, busy falling, the number of gated clock edges
// (P+5: the whole program plus the edge that stops it; every cycle of the
// frame when CLOCK_GATING = 0) and that the output does not move while the
// design is idle.
module fir_dsp_harness
  import fir_dsp_pkg::*;
#(
  parameter int unsigned NUM_MEM      = 2,
  parameter int unsigned TAPS         = 100,
  parameter int unsigned NFRAMES      = 300,
  parameter int unsigned FRAME_PERIOD = 256,
  parameter int unsigned SEED         = 1,
  parameter bit          CLOCK_GATING = 1'b1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_wraps
);

  localparam int unsigned DEPTH = (256 + NUM_MEM - 1) / NUM_MEM;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned SW    = (NUM_MEM > 1) ? $clog2(NUM_MEM) : 1;
  localparam int unsigned TOTAL = NUM_MEM * DEPTH;
  localparam int unsigned P     = (TAPS + NUM_MEM - 1) / NUM_MEM;

  logic               rst, frame_trig, prog_we, busy;
  prog_target_e       prog_target;
  logic [SW-1:0]      prog_bank;
  logic [7:0]         prog_addr;
  logic [31:0]        prog_data;
  sample_t            sample_in, sout;

  fir_dsp #(.NUM_MEM(NUM_MEM), .CLOCK_GATING(CLOCK_GATING)) dut (
    .clk(clk), .rst(rst), .frame_trig(frame_trig), .sample_in(sample_in),
    .prog_we(prog_we), .prog_target(prog_target), .prog_bank(prog_bank),
    .prog_addr(prog_addr), .prog_data(prog_data), .sout(sout), .busy(busy)
  );

  // gated clock edges seen by the datapath
  int gedges;
  always @(posedge dut.gclk) gedges++;

  sample_t coef [TAPS];
  sample_t xbuf [TOTAL];

  function automatic logic [31:0] instr(logic xbase_inc, logic xwr_en,
                                        logic prog_jump, int mem_pnt,
                                        logic outp, logic acc_en);
    logic [AW-1:0] pnt;
    pnt = AW'(mem_pnt);
    return 32'({xbase_inc, xwr_en, prog_jump, pnt, outp, acc_en});
  endfunction

  task automatic prog_write(prog_target_e t, int bank, int addr, logic [31:0] d);
    @(negedge clk);
    prog_we = 1'b1; prog_target = t; prog_bank = SW'(bank);
    prog_addr = 8'(addr); prog_data = d;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d t=%0t: %s", NUM_MEM, $time, what);
    end
  endtask

  initial begin
    int pa, g;
    sample_t expected, prev;
    void'($urandom(SEED));
    done = 0; checks = 0; failures = 0; n_wraps = 0; gedges = 0;
    rst = 1; frame_trig = 0; prog_we = 0; prog_target = PT_PMEM;
    prog_bank = '0; prog_addr = '0; prog_data = '0; sample_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // program: write sample, load row 0, P-1 accumulating reads, last
    // accumulation, output + advance, end of program
    pa = 0;
    prog_write(PT_PMEM, 0, pa++, instr(0, 1, 0, 0, 0, 0));
    prog_write(PT_PMEM, 0, pa++, instr(0, 0, 0, 0, 0, 0));
    for (int r = 1; r < int'(P); r++) prog_write(PT_PMEM, 0, pa++, instr(0, 0, 0, r, 0, 1));
    prog_write(PT_PMEM, 0, pa++, instr(0, 0, 0, 0, 0, 1));
    prog_write(PT_PMEM, 0, pa++, instr(1, 0, 0, 0, 1, 0));
    prog_write(PT_PMEM, 0, pa++, instr(0, 0, 1, 0, 0, 0));
    check(pa == int'(P) + 4, "program length");

    for (int j = 0; j < int'(TAPS); j++) begin
      coef[j] = sample_t'($urandom);
      prog_write(PT_YMEM, j % NUM_MEM, j / NUM_MEM, coef[j]);
    end
    // the memories have no reset: zero the unused lanes of the last row
    for (int j = int'(TAPS); j < int'(NUM_MEM * P); j++)
      prog_write(PT_YMEM, j % NUM_MEM, j / NUM_MEM, '0);
    for (int k = 0; k < int'(TOTAL); k++) begin
      xbuf[k] = sample_t'($urandom);
      prog_write(PT_XMEM, k % NUM_MEM, k / NUM_MEM, xbuf[k]);
    end
    repeat (4) @(negedge clk);
    check(busy == 1'b0, "idle after programming");

    prev = sout;
    for (int f = 0; f < int'(NFRAMES); f++) begin
      g = f % int'(TOTAL);
      if (f > 0 && g == 0) n_wraps++;
      // new sample and one-cycle frame trigger
      sample_in = sample_t'($urandom);
      xbuf[g] = sample_in;
      expected = '0;
      for (int i = 0; i < int'(TAPS); i++)
        expected += fx_mul(coef[i], xbuf[(g - i + int'(TOTAL)) % int'(TOTAL)]);
      gedges = 0;
      frame_trig = 1'b1;
      @(negedge clk);                        // frame edge E0 has passed
      frame_trig = 1'b0;
      repeat (P + 2) @(negedge clk);         // after edge E_(P+2)
      check(sout == prev, $sformatf("output early, frame %0d", f));
      @(negedge clk);                        // after edge E_(P+3)
      check(sout == expected, $sformatf("frame %0d: got %h want %h", f, sout, expected));
      @(negedge clk);                        // after edge E_(P+4)
      check(busy == 1'b0, $sformatf("busy after program, frame %0d", f));
      repeat (FRAME_PERIOD - P - 5) @(negedge clk);
      check(sout == expected, $sformatf("output held while idle, frame %0d", f));
      if (CLOCK_GATING)
        check(gedges == int'(P) + 5, $sformatf("gated edges %0d, frame %0d", gedges, f));
      else
        check(gedges == int'(FRAME_PERIOD), $sformatf("free-running edges %0d, frame %0d", gedges, f));
      prev = expected;
    end
    done = 1;
  end

endmodule
