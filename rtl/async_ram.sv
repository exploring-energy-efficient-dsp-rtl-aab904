// async_ram: memory with an asynchronous read port and a synchronous write
// port, the behaviour of the X, Y and P memories of the FIR DSP.
//
// A read returns mem[raddr] combinationally in the same cycle; a write
// stores wdata at waddr on the rising clock edge when we is high, so a value
// written in one cycle can be read from the next cycle on. The contents
// have no reset (as the asynchronous RAM of the original description): a
// word reads as unknown until written. DEPTH need not be a power of two:
// reads from an address at or above DEPTH return zero and writes there are
// ignored.
//
// Ports: clk, we/waddr/wdata (write), raddr/rdata (read).
// Timing: write on the rising edge, read combinational.
module async_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
