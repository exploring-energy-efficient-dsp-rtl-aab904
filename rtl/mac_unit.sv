// mac_unit: the multiply-accumulate section of the FIR DSP: NUM_MEM
// 32x32 fixed-point multipliers, an adder tree, the accumulation register
// and the output register.
//
// Each cycle the NUM_MEM lane products xreg[m] * yreg[m] (Q1.31, see
// fir_dsp_pkg) are summed. On the clock edge:
//   outp   = 1: the output register takes the accumulator and the
//               accumulator is cleared (outp wins over acc_en);
//   acc_en = 1: the accumulator adds the sum of the products;
//   otherwise   the accumulator holds.
// The output register only changes when outp is set. Both registers reset
// to 0. This is the document's behaviour; the adder tree shape is this
// implementation's (see adder_tree).
//
// Ports: clk, rst (asynchronous, active high), xreg/yreg lane operands,
// acc_en, outp, acc (accumulator), sout (output register).
module mac_unit
  import fir_dsp_pkg::*;
#(
  parameter int unsigned NUM_MEM = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t xreg [NUM_MEM],
  input  sample_t yreg [NUM_MEM],
  input  logic    acc_en,
  input  logic    outp,
  output sample_t acc,
  output sample_t sout
);

  logic [NUM_MEM-1:0][DATA_W-1:0] prod;
  sample_t psum;

  always_comb begin
    for (int m = 0; m < int'(NUM_MEM); m++) prod[m] = fx_mul(xreg[m], yreg[m]);
  end

  adder_tree #(.N(NUM_MEM), .W(DATA_W)) u_tree (.din(prod), .sum(psum));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc  <= '0;
      sout <= '0;
    end else if (outp) begin
      acc  <= '0;
      sout <= acc;
    end else if (acc_en) begin
      acc  <= acc + psum;
    end
  end

endmodule
