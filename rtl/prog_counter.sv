// prog_counter: program pointer of the FIR DSP.
//
// On every enabled clock edge the pointer advances by one. A frame trigger
// (a new input sample has arrived) sets it to 0 and restarts the program;
// it takes priority over everything else. An instruction with its end of
// program bit set sends the pointer to the last P-MEM address, LAST, and
// once there the pointer stays until the next frame trigger. The document
// keeps an idle instruction at LAST; fir_dsp instead decodes an idle
// instruction whenever it is not running, so the DSP does nothing while it
// waits whatever that word holds. Reset parks the pointer at LAST too, so that the first frame
// trigger after reset starts the program from an idle state; this reset
// value is this implementation's choice.
//
// Ports: clk, rst (asynchronous, active high), frame_trig, prog_jump (end of
// program bit of the instruction now at pc), pc. One edge per step.
module prog_counter #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          frame_trig,
  input  logic          prog_jump,
  output logic [AW-1:0] pc
);

  localparam logic [AW-1:0] LAST = '1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                pc <= LAST;
    else if (frame_trig)    pc <= '0;
    else if (prog_jump)     pc <= LAST;
    else if (pc == LAST)    pc <= LAST;
    else                    pc <= pc + 1'b1;
  end

endmodule
