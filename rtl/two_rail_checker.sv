// two_rail_checker: totally self-checking two-rail checker (TRC) for N input
// pairs.
//
// Input pair i is (x[i], y[i]); it is a valid code word when x[i] != y[i].
// The output pair (z0, z1) is complementary exactly when every input pair is
// complementary, and equal (00 or 11) when any pair is not. The checker is a
// cascade of two-pair cells, each computing
//   z0 = a0 b0 | a1 b1,   z1 = a0 b1 | a1 b0
// from pairs (a0, a1) and (b0, b1); a fault in a cell shows as a
// non-complementary output for some valid input, which is what makes the
// checker self-testing. Purely combinational.
//
// The document names the TRC and its role but not its insides; the standard
// two-pair cell in a linear cascade is this design's choice.
module two_rail_checker #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         z0,
  output logic         z1
);

  always_comb begin
    logic t0, t1;
    z0 = x[0];
    z1 = y[0];
    for (int i = 1; i < N; i++) begin
      t0 = (z0 & x[i]) | (z1 & y[i]);
      t1 = (z0 & y[i]) | (z1 & x[i]);
      z0 = t0;
      z1 = t1;
    end
  end

endmodule
