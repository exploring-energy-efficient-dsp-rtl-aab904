// xptr_ctrl: the pointer registers ("shift counters") that keep track of
// where the sample stream sits in the NUM_MEM interleaved X memories.
//
// Samples are written round-robin: the k-th sample goes to X memory
// (k mod NUM_MEM) at row (k div NUM_MEM), modulo DEPTH rows. Two counters do
// this: wr_sel picks the memory and advances on every sample write
// (xwr_en); when it wraps from NUM_MEM-1 to 0 the row pointer wr_ptr
// advances, wrapping at DEPTH-1.
//
// On the read side, once per output sample (xbase_inc) three registers move
// together:
//   * rd_sel, one bit per X memory: 0 = read that memory at row
//     (base - mem_pnt), 1 = at row (base - mem_pnt - 1). Its sequence is
//     0111.. -> 0011.. -> 0001.. -> 0000.. -> 0111.. (memory 0 first): each
//     step clears one more bit; from all-zero it refills and the base row
//     advances.
//   * base, the read base row, which therefore advances once every NUM_MEM
//     output samples.
//   * shft_cnt, the barrel shifter rotation, counting modulo NUM_MEM.
// Reset values (rd_sel = 0111.., shft_cnt = 1 mod NUM_MEM, pointers 0) make
// the first sample written after reset the newest sample of the first
// computed output. With NUM_MEM = 1 rd_sel is always 0, shft_cnt always 0
// and base advances on every xbase_inc, which is the single multiplier
// design. This follows the document; the register widths are the smallest
// that hold the counts.
//
// Ports: clk, rst (asynchronous, active high), xbase_inc, xwr_en, and the
// register outputs. All updates on the enabled clock edge.
module xptr_ctrl #(
  parameter int unsigned NUM_MEM = 2,
  parameter int unsigned DEPTH   = (256 + NUM_MEM - 1) / NUM_MEM,
  parameter int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned SW      = (NUM_MEM > 1) ? $clog2(NUM_MEM) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               xbase_inc,
  input  logic               xwr_en,
  output logic [AW-1:0]      base,
  output logic [NUM_MEM-1:0] rd_sel,
  output logic [SW-1:0]      shft_cnt,
  output logic [SW-1:0]      wr_sel,
  output logic [AW-1:0]      wr_ptr
);

  localparam logic [AW-1:0]      ROW_MAX  = AW'(DEPTH - 1);
  localparam logic [SW-1:0]      SEL_MAX  = SW'(NUM_MEM - 1);
  // every memory but memory 0 on the (row - 1) side
  localparam logic [NUM_MEM-1:0] SEL_FULL = {NUM_MEM{1'b1}} << 1;
  localparam logic [SW-1:0]      SHFT_RST = (NUM_MEM > 1) ? SW'(1) : '0;

  function automatic logic [AW-1:0] row_inc(logic [AW-1:0] r);
    return (r == ROW_MAX) ? '0 : r + 1'b1;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      base     <= '0;
      rd_sel   <= SEL_FULL;
      shft_cnt <= SHFT_RST;
    end else if (xbase_inc) begin
      if (rd_sel == '0) begin
        rd_sel <= SEL_FULL;
        base   <= row_inc(base);
      end else begin
        rd_sel <= rd_sel << 1;
      end
      shft_cnt <= (shft_cnt == SEL_MAX) ? '0 : shft_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_sel <= '0;
      wr_ptr <= '0;
    end else if (xwr_en) begin
      if (wr_sel == SEL_MAX) begin
        wr_sel <= '0;
        wr_ptr <= row_inc(wr_ptr);
      end else begin
        wr_sel <= wr_sel + 1'b1;
      end
    end
  end

endmodule
