// barrel_shifter: rotates a vector of N samples toward index 0 by cnt
// places, so that out[k] = in[(k + cnt) mod N].
//
// It is built from ceil(log2 N) stages; stage s rotates by 2^s places when
// bit s of cnt is set and passes the vector unchanged otherwise. Rotations
// add modulo N, so the structure is also correct when N is not a power of
// two (cnt then stays below N). With N = 1 there are no stages. Purely
// combinational. Structure and direction follow the document.
module barrel_shifter #(
  parameter int unsigned N  = 2,
  parameter int unsigned W  = 32,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]  din  [N],
  input  logic [SW-1:0] cnt,
  output logic [W-1:0]  dout [N]
);

  localparam int unsigned STAGES = (N > 1) ? $clog2(N) : 0;

  logic [W-1:0] stage [STAGES+1][N];

  always_comb begin
    stage[0] = din;
    for (int s = 0; s < int'(STAGES); s++) begin
      for (int k = 0; k < int'(N); k++) begin
        if (cnt[s]) stage[s+1][k] = stage[s][(k + (1 << s)) % int'(N)];
        else        stage[s+1][k] = stage[s][k];
      end
    end
  end

  assign dout = stage[STAGES];

endmodule
