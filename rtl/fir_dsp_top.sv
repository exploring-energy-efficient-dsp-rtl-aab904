// fir_dsp_top: the two FIR architectures of this design side by side, each
// with its own ports, sharing only clock and reset.
//
//   dsp_* : fir_dsp, the programmable processor with NUM_MEM multipliers
//           and clock gating (NUM_MEM = 1 is the single multiplier design;
//           CLOCK_GATING = 0 gives the ungated variant).
//   par_* : fir_parallel, the fully parallel variable-tap FIR with MAX_TAPS
//           multipliers.
//
// Both take 32-bit Q1.31 input samples and produce 32-bit Q1.31 output
// samples, at a sample rate of up to f_clk/256 (a new sample at most every
// 256 clock cycles, e.g. 192 kHz at 49.152 MHz). In the chip this DSP is
// meant for, an amplifier controller supplies samples, the frame trigger
// and the clock; its ports are simply brought out here. See the two
// modules for interface and timing.
module fir_dsp_top
  import fir_dsp_pkg::*;
#(
  parameter int unsigned NUM_MEM  = 2,
  parameter int unsigned MAX_TAPS = 256,
  parameter bit          CLOCK_GATING = 1'b1,
  parameter int unsigned SW       = (NUM_MEM > 1) ? $clog2(NUM_MEM) : 1,
  parameter int unsigned TW       = $clog2(MAX_TAPS)
) (
  input  logic          clk,
  input  logic          rst,
  // programmable n-multiplier DSP
  input  logic          dsp_frame_trig,
  input  sample_t       dsp_sample_in,
  input  logic          dsp_prog_we,
  input  prog_target_e  dsp_prog_target,
  input  logic [SW-1:0] dsp_prog_bank,
  input  logic [7:0]    dsp_prog_addr,
  input  logic [31:0]   dsp_prog_data,
  output sample_t       dsp_sout,
  output logic          dsp_busy,
  // fully parallel FIR
  input  logic          par_frame,
  input  sample_t       par_sample_in,
  input  logic [TW-1:0] par_inj_pos,
  input  logic          par_coef_we,
  input  logic [TW-1:0] par_coef_addr,
  input  sample_t       par_coef_data,
  output sample_t       par_sample_out
);

  fir_dsp #(.NUM_MEM(NUM_MEM), .CLOCK_GATING(CLOCK_GATING)) u_dsp (
    .clk(clk), .rst(rst),
    .frame_trig(dsp_frame_trig), .sample_in(dsp_sample_in),
    .prog_we(dsp_prog_we), .prog_target(dsp_prog_target),
    .prog_bank(dsp_prog_bank), .prog_addr(dsp_prog_addr),
    .prog_data(dsp_prog_data), .sout(dsp_sout), .busy(dsp_busy)
  );

  fir_parallel #(.MAX_TAPS(MAX_TAPS)) u_par (
    .clk(clk), .rst(rst), .frame(par_frame), .sample_in(par_sample_in),
    .inj_pos(par_inj_pos), .coef_we(par_coef_we), .coef_addr(par_coef_addr),
    .coef_data(par_coef_data), .sample_out(par_sample_out)
  );

endmodule
