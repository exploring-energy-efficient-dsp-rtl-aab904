// tb_fir_dsp_top: end-to-end, self-checking test of the top level at its
// default parameters (2-multiplier DSP, 256-position parallel FIR). It is
// the full-size test: no parameter of the top is overridden.
//
// Both filters run the same job: a 100-tap filter with random coefficients
// on a random 32-bit sample stream, one sample every 256 clock cycles (a
// 192 kHz sample rate from a 49.152 MHz clock). The DSP is loaded through its
// programming port (program, coefficients and a zeroed sample history); the
// parallel filter gets its coefficients and injection position 99.
// After 300 samples both are switched to 30 taps: the DSP gets a new program
// and new coefficients while its sample history is kept, so its outputs are
// checked straight away; the parallel filter needs one filter length of
// warm-up before its outputs are checked. 100 more samples follow.
//
// Checks: every output of both filters against a reference
// (sum of truncated Q1.31 products, wrapping), the DSP output unchanged
// P+2 cycles after the frame trigger and new at P+3, busy low from P+4,
// the program within the 256-cycle frame, and the output held while idle.
// Counts and requires each mechanism at least once: program start, park at
// end of program, gated-off core clock cycles, memory writes while the core
// clock is off, X write-pointer wrap, base-row advance, non-zero barrel
// shift, accumulator output, each programming target, DSP reprogramming,
// parallel shifts and the parallel length switch.
module tb_fir_dsp_top;
  import fir_dsp_pkg::*;

  localparam int NUM_MEM = 2;                      // top default
  localparam int DEPTH   = (256 + NUM_MEM - 1) / NUM_MEM;
  localparam int AW      = $clog2(DEPTH);
  localparam int FRAME   = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst;
  logic         dsp_frame_trig, dsp_prog_we, dsp_busy;
  sample_t      dsp_sample_in, dsp_sout;
  prog_target_e dsp_prog_target;
  logic [0:0]   dsp_prog_bank;
  logic [7:0]   dsp_prog_addr;
  logic [31:0]  dsp_prog_data;
  logic         par_frame, par_coef_we;
  sample_t      par_sample_in, par_coef_data, par_sample_out;
  logic [7:0]   par_inj_pos, par_coef_addr;

  fir_dsp_top dut (.*);

  int checks = 0, failures = 0;
  sample_t coef [256];
  sample_t hist [$];              // hist[0] = newest sample
  int taps, P, par_warm;

  // mechanism counters
  int m_start = 0, m_park = 0, m_gated = 0, m_memonly = 0, m_wrap = 0;
  int m_base = 0, m_shift = 0, m_outp = 0, m_prog_p = 0, m_prog_x = 0;
  int m_prog_y = 0, m_reprog = 0, m_par_shift = 0, m_par_switch = 0;
  int gedges = 0, medges = 0;

  always @(posedge dut.u_dsp.gclk)     gedges++;
  always @(posedge dut.u_dsp.gclk_mem) medges++;
  always @(posedge clk) begin
    if (!rst) begin
      if (!dut.u_dsp.core_en) m_gated++;
      if (!dut.u_dsp.core_en && dut.u_dsp.mem_en) m_memonly++;
      if (dut.u_dsp.running && dut.u_dsp.instr.xbase_inc) m_base++;
      if (dut.u_dsp.running && dut.u_dsp.instr.outp) m_outp++;
      if (dut.u_dsp.running && dut.u_dsp.instr.acc_en && dut.u_dsp.shft_cnt != 0) m_shift++;
      if (dut.u_dsp.running && dut.u_dsp.instr.xwr_en &&
          int'(dut.u_dsp.wr_ptr) == DEPTH - 1 && int'(dut.u_dsp.wr_sel) == NUM_MEM - 1) m_wrap++;
      if (dut.u_dsp.running && dut.u_dsp.instr.prog_jump) m_park++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic logic [31:0] instr(logic xbase_inc, logic xwr_en, logic prog_jump,
                                        int mem_pnt, logic outp, logic acc_en);
    logic [AW-1:0] pnt;
    pnt = AW'(mem_pnt);
    return 32'({xbase_inc, xwr_en, prog_jump, pnt, outp, acc_en});
  endfunction

  task automatic prog_write(prog_target_e t, int bank, int addr, logic [31:0] d);
    @(negedge clk);
    dsp_prog_we = 1'b1; dsp_prog_target = t; dsp_prog_bank = 1'(bank);
    dsp_prog_addr = 8'(addr); dsp_prog_data = d;
    case (t)
      PT_PMEM: m_prog_p++;
      PT_XMEM: m_prog_x++;
      default: m_prog_y++;
    endcase
    @(negedge clk);
    dsp_prog_we = 1'b0;
  endtask

  // Load a filter of n taps into both designs (new random coefficients).
  task automatic load_filter(int n);
    int pa;
    taps = n;
    P = (n + NUM_MEM - 1) / NUM_MEM;
    for (int j = 0; j < 256; j++) coef[j] = (j < n) ? sample_t'($urandom) : '0;
    pa = 0;
    prog_write(PT_PMEM, 0, pa++, instr(0, 1, 0, 0, 0, 0));
    prog_write(PT_PMEM, 0, pa++, instr(0, 0, 0, 0, 0, 0));
    for (int r = 1; r < P; r++) prog_write(PT_PMEM, 0, pa++, instr(0, 0, 0, r, 0, 1));
    prog_write(PT_PMEM, 0, pa++, instr(0, 0, 0, 0, 0, 1));
    prog_write(PT_PMEM, 0, pa++, instr(1, 0, 0, 0, 1, 0));
    prog_write(PT_PMEM, 0, pa++, instr(0, 0, 1, 0, 0, 0));
    for (int j = 0; j < NUM_MEM * P; j++) prog_write(PT_YMEM, j % NUM_MEM, j / NUM_MEM, coef[j]);
    // parallel filter: injection at n-1, c_i at position n-1-i
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      par_coef_we = 1'b1; par_coef_addr = 8'(n - 1 - i); par_coef_data = coef[i];
    end
    @(negedge clk);
    par_coef_we = 1'b0; par_inj_pos = 8'(n - 1);
  endtask

  function automatic sample_t model();
    sample_t y = '0;
    for (int i = 0; i < taps; i++) if (i < hist.size()) y += fx_mul(coef[i], hist[i]);
    return y;
  endfunction

  // One sample period for both designs.
  task automatic frame(bit check_par);
    sample_t s, want, prev;
    int g0;
    s = sample_t'($urandom);
    prev = dsp_sout;
    hist.push_front(s);
    want = model();
    @(negedge clk);
    dsp_frame_trig = 1'b1; dsp_sample_in = s;
    par_frame = 1'b1; par_sample_in = s;
    g0 = gedges;
    #1;
    if (check_par) check(par_sample_out == want, $sformatf("parallel output, %0d taps", taps));
    @(negedge clk);
    dsp_frame_trig = 1'b0; par_frame = 1'b0;
    m_start++; m_par_shift++;
    // the trigger edge has passed; count the edges after it
    repeat (P + 2) @(negedge clk);          // P+2 edges after the trigger
    check(dsp_sout == prev, "DSP output not yet updated at P+2");
    check(dsp_busy, "DSP busy at P+2");
    @(negedge clk);                          // P+3
    check(dsp_sout == want, $sformatf("DSP output at P+3, %0d taps", taps));
    @(negedge clk);                          // P+4
    check(!dsp_busy, "DSP idle at P+4");
    check(P + 4 <= FRAME, "program fits the frame");
    repeat (FRAME - P - 6) @(negedge clk);
    check(dsp_sout == want, "DSP output held while idle");
    check(gedges - g0 == P + 5, $sformatf("gated clock edges %0d want %0d", gedges - g0, P + 5));
  endtask

  initial begin
    rst = 1'b1;
    dsp_frame_trig = 0; dsp_prog_we = 0; dsp_prog_target = PT_PMEM; dsp_prog_bank = 0;
    dsp_prog_addr = 0; dsp_prog_data = 0; dsp_sample_in = 0;
    par_frame = 0; par_coef_we = 0; par_sample_in = 0; par_coef_data = 0;
    par_inj_pos = 0; par_coef_addr = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // zeroed sample history in the DSP, as the parallel filter after reset
    for (int k = 0; k < NUM_MEM * DEPTH; k++) prog_write(PT_XMEM, k % NUM_MEM, k / NUM_MEM, '0);
    load_filter(100);
    for (int f = 0; f < 300; f++) frame(1'b1);

    // switch both to 30 taps
    load_filter(30);
    m_reprog++; m_par_switch++;
    par_warm = 30;
    for (int f = 0; f < 100; f++) begin
      frame(f >= par_warm);
    end

    check(m_start > 0 && m_park == m_start, "program start and park");
    check(m_gated > 0, "core clock gated off");
    check(m_memonly > 0, "memory written while core clock off");
    check(m_wrap > 0, "X write pointer wrapped");
    check(m_base > 0 && m_outp > 0, "base advance and output");
    check(m_shift > 0, "non-zero barrel shift");
    check(m_prog_p > 0 && m_prog_x > 0 && m_prog_y > 0, "all programming targets");
    check(m_reprog > 0 && m_par_switch > 0 && m_par_shift > 0, "reprogramming and parallel shifts");
    $display("mechanisms: start=%0d park=%0d gated_cycles=%0d mem_only_cycles=%0d x_wrap=%0d base_inc=%0d shift_nonzero=%0d outp=%0d prog_p=%0d prog_x=%0d prog_y=%0d reprogram=%0d par_shift=%0d par_switch=%0d",
             m_start, m_park, m_gated, m_memonly, m_wrap, m_base, m_shift, m_outp,
             m_prog_p, m_prog_x, m_prog_y, m_reprog, m_par_shift, m_par_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
