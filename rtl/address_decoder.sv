// address_decoder: the address decoder of one bus of a register file.
//
// It decodes the register select RS (ADDR_W bits) into one line per register
// and gates each of the OPS operation lines with it, so register i receives
// op[o] exactly when RS == i. Bus A's decoder carries RDA, bus B's RDB and
// bus C's decoder carries RDC, WRC and CLR. Purely combinational.
//
// One decoder per bus, three per register file, with the operation line
// entering the decoder, follows the document; the gating of every operation
// line per register output is this design's reading of it.
module address_decoder #(
  parameter int unsigned NREGS  = 32,
  parameter int unsigned ADDR_W = $clog2(NREGS),
  parameter int unsigned OPS    = 1
) (
  input  logic [ADDR_W-1:0]          rs,    // register select
  input  logic [OPS-1:0]             op,    // operation lines for this bus
  output logic [NREGS-1:0][OPS-1:0]  line   // per-register operation lines
);

  always_comb begin
    for (int i = 0; i < NREGS; i++)
      line[i] = (rs == ADDR_W'(i)) ? op : '0;
  end

endmodule
