// fir_dsp: programmable streaming FIR filter processor with NUM_MEM
// parallel multipliers, the "knob" that trades time for area. NUM_MEM = 1 is
// the single multiplier design; larger values split the 256-word sample and
// coefficient stores over NUM_MEM memories of ceil(256/NUM_MEM) words each,
// so a filter of N taps takes ceil(N/NUM_MEM) multiply cycles.
//
// How it works. A 256-word program memory (P-MEM) holds one instruction per
// cycle; the program pointer (prog_counter) is restarted by the frame
// trigger that announces a new input sample and parks on the last P-MEM word
// after an instruction with the end-of-program bit. The instruction word is
// packed, MSB first, as
//   {xbase_inc, xwr_en, prog_jump, mem_pnt[AW-1:0], outp, acc_en}
// with AW = ceil(log2(ceil(256/NUM_MEM))):
//   xbase_inc  one output sample is done: advance the read pointers
//   xwr_en     write sample_in into the X memories
//   prog_jump  end of program
//   mem_pnt    row in the Y memories, row offset back in time in the X ones
//   outp       accumulator -> output register, clear the accumulator
//   acc_en     add the sum of the lane products to the accumulator
// Samples are stored interleaved: the k-th sample in X memory k mod NUM_MEM,
// row k div NUM_MEM. Coefficient c_j lives in Y memory j mod NUM_MEM, row
// j div NUM_MEM. For each instruction the address decoder reads every X
// memory at row (base - mem_pnt) or one row earlier, and the barrel shifter
// rotates the X outputs so that lane m gets the sample that belongs with
// coefficient c_(mem_pnt*NUM_MEM + m). The lane values are registered (X and
// Y registers); in the next cycle the NUM_MEM products are summed by an adder
// tree into the accumulator. So an instruction's acc_en acts on the operands
// read by the instruction before it.
//
// A filter program of N taps (P = ceil(N/NUM_MEM)) is: write the sample;
// read row 0; P-1 instructions reading rows 1..P-1 with acc_en; one more
// acc_en; outp with xbase_inc; an idle word with prog_jump. It is P+4 words
// long and the output register holds the new output P+3 cycles after the
// frame trigger.
//
// Clock gating: a register (running) is set by the frame trigger and cleared
// when the end-of-program instruction executes. The datapath and its
// registers run on a gated clock enabled by frame_trig | running, so the
// design is stopped between programs. The gate is also open while reset is
// asserted, so that the registers behind it are reset by a clock edge as
// well (this implementation's choice). The memories sit on a second gated
// clock that is also enabled by a programming write, so they can be loaded
// while the rest is stopped. The single clock gate of the document is split
// in two here for that reason. With CLOCK_GATING = 0 both gates are left
// out (the document's designs without clock gating): the clock then runs
// continuously and the registers hold between programs through their
// enables instead (the idle no-operation keeps the pointers, accumulator and
// output still; the X/Y registers load only while the core is enabled).
//
// Programming port (this implementation's own, one port for all memories):
// when prog_we is high, prog_data is written on the clock edge to the memory
// chosen by prog_target (fir_dsp_pkg::prog_target_e) and prog_bank (X or Y
// memory index) at prog_addr. A programming write to the X memories takes
// precedence over a sample write in the same cycle. Program the design only
// while busy is low.
//
// While no program runs, the instruction decoder outputs a no-operation
// instead of the P-MEM word at the parked address (the document keeps an
// idle instruction in that word). The memories have no reset; everything a
// program reads must be loaded first: the program, the coefficients of
// every lane of the last Y row used (zero beyond the filter length) and
// the X memories, whose unwritten words are otherwise unknown.
//
// Everything else (instruction fields, pointers, interleaving, barrel
// shifter, MAC behaviour) follows the document. Reset is asynchronous and
// active high; it clears the registers, not the memories.
module fir_dsp
  import fir_dsp_pkg::*;
#(
  parameter int unsigned NUM_MEM    = 2,
  parameter int unsigned MEM_SIZE   = 256,
  parameter int unsigned PMEM_DEPTH = 256,
  parameter int unsigned PROG_AW    = 8,
  parameter bit          CLOCK_GATING = 1'b1,
  parameter int unsigned DEPTH      = (MEM_SIZE + NUM_MEM - 1) / NUM_MEM,
  parameter int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned SW         = (NUM_MEM > 1) ? $clog2(NUM_MEM) : 1,
  parameter int unsigned PAW        = $clog2(PMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               frame_trig,
  input  sample_t            sample_in,
  input  logic               prog_we,
  input  prog_target_e       prog_target,
  input  logic [SW-1:0]      prog_bank,
  input  logic [PROG_AW-1:0] prog_addr,
  input  logic [DATA_W-1:0]  prog_data,
  output sample_t            sout,
  output logic               busy
);

  typedef struct packed {
    logic          xbase_inc;
    logic          xwr_en;
    logic          prog_jump;
    logic [AW-1:0] mem_pnt;
    logic          outp;
    logic          acc_en;
  } instr_t;

  localparam int unsigned IW = $bits(instr_t);

  // ---------------------------------------------------------------- gating
  logic running, core_en, mem_en, gclk, gclk_mem;
  instr_t instr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                          running <= 1'b0;
    else if (frame_trig)              running <= 1'b1;
    else if (running && instr.prog_jump) running <= 1'b0;
  end

  // the clocks also run during reset, so every register sees it
  assign core_en = frame_trig | running | rst;
  assign mem_en  = core_en | prog_we;
  assign busy    = running;

  if (CLOCK_GATING) begin : g_cg
    clock_gate u_cg_core (.clk(clk), .en(core_en), .gclk(gclk));
    clock_gate u_cg_mem  (.clk(clk), .en(mem_en),  .gclk(gclk_mem));
  end else begin : g_no_cg
    // free-running clock; idle registers hold through their enables
    assign gclk     = clk;
    assign gclk_mem = clk;
  end

  // ------------------------------------------------------- program control
  logic [PAW-1:0] pc;
  logic [IW-1:0]  instr_word;

  prog_counter #(.AW(PAW)) u_pc (
    .clk(gclk), .rst(rst), .frame_trig(frame_trig),
    .prog_jump(instr.prog_jump), .pc(pc)
  );

  async_ram #(.DEPTH(PMEM_DEPTH), .WIDTH(IW)) u_pmem (
    .clk(gclk_mem),
    .we(prog_we && prog_target == PT_PMEM),
    .waddr(prog_addr[PAW-1:0]), .wdata(prog_data[IW-1:0]),
    .raddr(pc), .rdata(instr_word)
  );

  // While parked (not running) the word at the parked address is not
  // executed: a no-operation is decoded instead, so the P-MEM needs no reset
  // and the edge that starts a program does nothing but restart it.
  assign instr = running ? instr_t'(instr_word) : '0;

  // --------------------------------------------------------- X addressing
  logic [AW-1:0]      base, wr_ptr;
  logic [NUM_MEM-1:0] rd_sel, x_wr_en;
  logic [SW-1:0]      shft_cnt, wr_sel;
  logic [AW-1:0]      x_rd_addr [NUM_MEM];

  xptr_ctrl #(.NUM_MEM(NUM_MEM), .DEPTH(DEPTH), .AW(AW), .SW(SW)) u_xptr (
    .clk(gclk), .rst(rst),
    .xbase_inc(instr.xbase_inc), .xwr_en(instr.xwr_en),
    .base(base), .rd_sel(rd_sel), .shft_cnt(shft_cnt),
    .wr_sel(wr_sel), .wr_ptr(wr_ptr)
  );

  xaddr_decoder #(.NUM_MEM(NUM_MEM), .DEPTH(DEPTH), .AW(AW), .SW(SW)) u_xdec (
    .base(base), .mem_pnt(instr.mem_pnt), .rd_sel(rd_sel),
    .xwr_en(instr.xwr_en), .wr_sel(wr_sel),
    .rd_addr(x_rd_addr), .wr_en(x_wr_en)
  );

  // ------------------------------------------------------------- memories
  logic    ext_x, ext_y;
  sample_t xout [NUM_MEM];
  sample_t yout [NUM_MEM];

  assign ext_x = prog_we && prog_target == PT_XMEM;
  assign ext_y = prog_we && prog_target == PT_YMEM;

  for (genvar i = 0; i < NUM_MEM; i++) begin : g_mem
    logic          xwe;
    logic [AW-1:0] xwaddr;
    sample_t       xwdata;

    always_comb begin
      if (ext_x) begin
        xwe    = (32'(prog_bank) == i);
        xwaddr = prog_addr[AW-1:0];
        xwdata = prog_data;
      end else begin
        xwe    = x_wr_en[i];
        xwaddr = wr_ptr;
        xwdata = sample_in;
      end
    end

    async_ram #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_xmem (
      .clk(gclk_mem), .we(xwe), .waddr(xwaddr), .wdata(xwdata),
      .raddr(x_rd_addr[i]), .rdata(xout[i])
    );

    async_ram #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_ymem (
      .clk(gclk_mem),
      .we(ext_y && (32'(prog_bank) == i)),
      .waddr(prog_addr[AW-1:0]), .wdata(prog_data),
      .raddr(instr.mem_pnt), .rdata(yout[i])
    );
  end

  // ----------------------------------------- barrel shifter, X/Y registers
  logic [DATA_W-1:0] xrot [NUM_MEM];
  logic [DATA_W-1:0] xraw [NUM_MEM];
  sample_t           xreg [NUM_MEM];
  sample_t           yreg [NUM_MEM];

  always_comb begin
    for (int i = 0; i < int'(NUM_MEM); i++) xraw[i] = xout[i];
  end

  barrel_shifter #(.N(NUM_MEM), .W(DATA_W), .SW(SW)) u_bshift (
    .din(xraw), .cnt(shft_cnt), .dout(xrot)
  );

  // Lane m takes rotated element NUM_MEM-1-m (the rotated vector reversed).
  always_ff @(posedge gclk or posedge rst) begin
    if (rst) begin
      for (int m = 0; m < int'(NUM_MEM); m++) begin
        xreg[m] <= '0;
        yreg[m] <= '0;
      end
    end else if (core_en) begin
      for (int m = 0; m < int'(NUM_MEM); m++) begin
        xreg[m] <= xrot[NUM_MEM-1-m];
        yreg[m] <= yout[m];
      end
    end
  end

  // ------------------------------------------------------------------ MAC
  sample_t acc;

  mac_unit #(.NUM_MEM(NUM_MEM)) u_mac (
    .clk(gclk), .rst(rst), .xreg(xreg), .yreg(yreg),
    .acc_en(instr.acc_en), .outp(instr.outp), .acc(acc), .sout(sout)
  );

  // ----------------------------------------------------------- assertions
  // A new sample must not arrive before the program has finished, and the
  // memories must not be reprogrammed while a program runs.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    !(frame_trig && running))
    else $error("fir_dsp: frame trigger while the program is still running");
  a_no_prog_while_busy: assert property (@(posedge clk) disable iff (rst)
    !(prog_we && running))
    else $error("fir_dsp: programming write while the program is running");

endmodule
