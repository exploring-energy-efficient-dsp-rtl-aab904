// fir_parallel: fully parallel FIR filter with a variable number of taps,
// the dedicated design at the minimum-time end of the time-area trade-off.
//
// Structure (positions k = 0 .. MAX_TAPS-1): a delay line of MAX_TAPS-1
// sample registers X[0..MAX_TAPS-2], MAX_TAPS coefficient registers Y[k],
// one 32x32 fixed-point multiplier per position and an adder tree. Data in
// the delay line moves from high to low positions. In front of each
// position sits a multiplexer that can inject the input sample there; the
// injection position p = inj_pos selects the filter length, N = p + 1 taps.
// The operand of position k is
//   k == p : sample_in             (newest sample)
//   k <  p : X[k]                  (sample p - k frames old)
//   k >  p : 0                     (unused position)
// and sample_out = sum_k operand[k] * Y[k], combinationally, in Q1.31 with
// truncated products and wrapping sums (fir_dsp_pkg). So coefficient c_i
// (for the sample i frames old) belongs at Y[p - i]. On a clock edge with
// frame high, X[k] <= operand[k+1] for every k < p: the line shifts by one
// and the input sample enters at X[p-1]. Registers at positions p and above
// are not enabled and keep their contents. Without frame nothing changes.
//
// Interface: clk, rst (asynchronous, active high, clears X and Y), frame,
// sample_in, inj_pos, coef_we/coef_addr/coef_data (writes Y[coef_addr] on
// the clock edge), sample_out. Timing: present a new sample with frame high
// for one cycle; sample_out for it is valid during that same cycle, before
// the edge that shifts the line.
//
// The injection muxes, enables, register counts and arithmetic follow the
// document. The coefficient write port (the document loads the whole bank
// through a wide input) and zeroing the operands above the injection point
// (the document relies on those registers holding zero) are this
// implementation's choices.
module fir_parallel
  import fir_dsp_pkg::*;
#(
  parameter int unsigned MAX_TAPS = 256,
  parameter int unsigned TW       = $clog2(MAX_TAPS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          frame,
  input  sample_t       sample_in,
  input  logic [TW-1:0] inj_pos,
  input  logic          coef_we,
  input  logic [TW-1:0] coef_addr,
  input  sample_t       coef_data,
  output sample_t       sample_out
);

  // packed, one 32-bit word per position
  logic [MAX_TAPS-1:0][DATA_W-1:0] yr, opd, prod;

  for (genvar k = 0; k < MAX_TAPS; k++) begin : g_tap
    // coefficient register of position k
    sample_t y_q;
    always_ff @(posedge clk or posedge rst) begin
      if (rst)                                  y_q <= '0;
      else if (coef_we && coef_addr == TW'(k))  y_q <= coef_data;
    end
    assign yr[k] = y_q;

    if (k < MAX_TAPS - 1) begin : g_x
      // delay register of position k: enabled below the injection point
      sample_t x_q;
      always_ff @(posedge clk or posedge rst) begin
        if (rst)                              x_q <= '0;
        else if (frame && TW'(k) < inj_pos)   x_q <= opd[k+1];
      end
      assign opd[k] = (TW'(k) == inj_pos) ? sample_in :
                      (TW'(k) <  inj_pos) ? x_q       : '0;
    end else begin : g_last
      assign opd[k] = (TW'(k) == inj_pos) ? sample_in : '0;
    end

    assign prod[k] = fx_mul(opd[k], yr[k]);
  end

  adder_tree #(.N(MAX_TAPS), .W(DATA_W)) u_tree (.din(prod), .sum(sample_out));

endmodule
