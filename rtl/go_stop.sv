// go_stop: GO/STOP unit that lets the ALU result through only when both
// operands were found error free.
//
// It merges the two-rail outputs of checker A and checker B in one more
// two-rail cell. A bus that carried no operand for this result (use_x low)
// contributes the fixed valid pair 10, so an idle bus cannot stop the result.
// go is high when the merged pair is complementary; result_out then equals
// result_in, otherwise it is forced to zero and stop is high. Purely
// combinational: the caller presents the checker pairs captured with the
// operands, so the decision applies to the result computed from them.
//
// The unit's role (stop the processor from passing a result computed from
// faulty operands) follows the document; its internals, the idle-bus pair
// and zeroing the blocked result are this design's choices.
module go_stop #(
  parameter int unsigned DATA_W = 32
) (
  input  logic [1:0]        pair_a,     // two-rail result of checker A
  input  logic [1:0]        pair_b,     // two-rail result of checker B
  input  logic              use_a,      // bus A carried an operand
  input  logic              use_b,      // bus B carried an operand
  input  logic [DATA_W-1:0] result_in,  // ALU result
  output logic              go,
  output logic              stop,
  output logic [DATA_W-1:0] result_out
);

  logic [1:0] pa, pb;
  logic       g0, g1;

  assign pa = use_a ? pair_a : 2'b10;
  assign pb = use_b ? pair_b : 2'b10;

  two_rail_checker #(.N(2)) u_merge (
    .x ({pa[1], pb[1]}),
    .y ({pa[0], pb[0]}),
    .z0(g0),
    .z1(g1)
  );

  assign go         = g0 ^ g1;
  assign stop       = ~go;
  assign result_out = go ? result_in : '0;

endmodule
