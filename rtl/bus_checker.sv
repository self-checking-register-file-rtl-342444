// bus_checker: concurrent error checker for one read bus (checker A or B).
//
// A zero counter regenerates the Berger check symbol of the data word on the
// bus, and a two-rail checker compares it with the check symbol read from the
// check symbol register file. The regenerated symbol and the bitwise
// complement of the stored symbol form CHK_W two-rail pairs, so the output
// pair z = {z0, z1} is 10 or 01 when the two agree and 00 or 11 when they do
// not. error is high for a non-complementary z. Purely combinational; it
// works in parallel with the ALU input latches.
//
// Zero counter plus TRC follows the document; feeding the TRC with the
// complement of the stored symbol is this design's choice.
module bus_checker #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned CHK_W  = $clog2(DATA_W + 1)
) (
  input  logic [DATA_W-1:0] data,        // word on the data bus
  input  logic [CHK_W-1:0]  stored_chk,  // check symbol on the check symbol bus
  output logic [CHK_W-1:0]  gen_chk,     // regenerated check symbol
  output logic [1:0]        z,           // two-rail result {z0, z1}
  output logic              error        // z is not a valid two-rail code
);

  berger_check_gen #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_gen (
    .data (data),
    .check(gen_chk)
  );

  two_rail_checker #(.N(CHK_W)) u_trc (
    .x (gen_chk),
    .y (~stored_chk),
    .z0(z[1]),
    .z1(z[0])
  );

  assign error = ~(z[1] ^ z[0]);

endmodule
