// Candidate-row former: the two barrel shifters of per-row delivery.
//
// left_row and right_row are one row each of the left and right reference MB
// (pixel p in bits [p*D +: D], pixel 0 leftmost).  The left row is shifted
// left by x_off pixels and the right row right by N - x_off pixels, and the
// two are merged, so output pixel p is left[p + x_off] for p < N - x_off and
// right[p + x_off - N] otherwise.  x_off runs 0..N (0: only the left MB
// contributes, N: only the right MB).  Combinational.
module row_combiner #(
  parameter int unsigned N  = me3d_pkg::N_DEF,
  parameter int unsigned D  = me3d_pkg::D_DEF,
  parameter int unsigned OW = $clog2(N + 1)
) (
  input  logic [N*D-1:0] left_row,
  input  logic [N*D-1:0] right_row,
  input  logic [OW-1:0]  x_off,
  output logic [N*D-1:0] cand_row
);

  localparam int unsigned SW = $clog2(N * D + 1);

  logic [SW-1:0]  lsh, rsh;
  logic [N*D-1:0] l_shifted, r_shifted;

  always_comb begin
    lsh       = SW'(x_off) * SW'(D);
    rsh       = (SW'(N) - SW'(x_off)) * SW'(D);
    l_shifted = left_row >> lsh;
    r_shifted = right_row << rsh;
    cand_row  = l_shifted | r_shifted;
  end

endmodule
