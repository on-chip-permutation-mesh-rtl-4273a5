// grant_encoder: one-hot to binary encoder.
//
// Turns the arbiter's one-hot ownership vector of an output into the binary
// select of that output's crossbar mux. It is an OR-tree encoder: the index
// is the OR of the indices of all set bits, which is exact for a one-hot (or
// all-zero) input; `any` tells whether some bit is set. Purely combinational.
// The switch's "encoder" is only named in the published description; its use
// here, between arbiter and muxes, is this design's reading.
module grant_encoder #(
  parameter int unsigned N = 4,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] onehot,
  output logic [W-1:0] idx,
  output logic         any
);

  always_comb begin
    idx = '0;
    for (int unsigned i = 0; i < N; i++)
      if (onehot[i]) idx |= W'(i);
  end

  assign any = |onehot;

endmodule
