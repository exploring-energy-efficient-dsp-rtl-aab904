// xaddr_decoder: turns the pointer registers and the memory pointer field
// of the current instruction into one read address per X memory, and the
// sample write into one write strobe per X memory.
//
// The relative address a = base - mem_pnt is taken modulo DEPTH, so the X
// memories form one circular buffer. X memory i is read at row a when
// rd_sel[i] is 0 and at row a - 1 (again modulo DEPTH) when it is 1. A
// sample write (xwr_en) goes to memory wr_sel at row wr_ptr. Purely
// combinational. The arithmetic follows the document.
module xaddr_decoder #(
  parameter int unsigned NUM_MEM = 2,
  parameter int unsigned DEPTH   = (256 + NUM_MEM - 1) / NUM_MEM,
  parameter int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned SW      = (NUM_MEM > 1) ? $clog2(NUM_MEM) : 1
) (
  input  logic [AW-1:0]      base,
  input  logic [AW-1:0]      mem_pnt,
  input  logic [NUM_MEM-1:0] rd_sel,
  input  logic               xwr_en,
  input  logic [SW-1:0]      wr_sel,
  output logic [AW-1:0]      rd_addr [NUM_MEM],
  output logic [NUM_MEM-1:0] wr_en
);

  localparam logic [AW-1:0] ROW_MAX = AW'(DEPTH - 1);

  logic [AW-1:0] rel;

  always_comb begin
    if (base >= mem_pnt) rel = base - mem_pnt;
    else                 rel = ROW_MAX - (mem_pnt - base - 1'b1);
    for (int i = 0; i < int'(NUM_MEM); i++) begin
      if (!rd_sel[i])     rd_addr[i] = rel;
      else if (rel == '0) rd_addr[i] = ROW_MAX;
      else                rd_addr[i] = rel - 1'b1;
      wr_en[i] = xwr_en && (32'(wr_sel) == i);
    end
  end

endmodule
