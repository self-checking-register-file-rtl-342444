// rf_bit_cell: one-bit, three-port register cell, the basic cell of both the
// data and the check symbol register files.
//
// Ports A and B are read-only; port C reads or writes. The stored bit is
// gated onto each read port while that port's read line is high and is 0
// otherwise, so a bus is the OR of all cells on it (a wired bus with one
// driver at a time). On a rising clock edge CLR loads CLR_VAL, else WRC loads
// bus C. CLR has priority over WRC; the cell has no reset, the register file
// is cleared with CLR.
//
// The three ports and the five control lines (RDA, RDB, RDC, WRC, CLR) follow
// the document. The clocked write, the CLR priority and the CLR_VAL parameter
// (so a check-symbol cell can clear to the code of the all-zero word) are this
// design's choices.
module rf_bit_cell #(
  parameter bit CLR_VAL = 1'b0    // value loaded by CLR
) (
  input  logic clk,
  input  logic rda,   // gate the stored bit onto bus A
  input  logic rdb,   // gate the stored bit onto bus B
  input  logic rdc,   // gate the stored bit onto bus C (read)
  input  logic wrc,   // write bus C into the cell
  input  logic clr,   // clear the cell to CLR_VAL
  input  logic dc,    // bus C data in
  output logic qa,    // contribution to bus A
  output logic qb,    // contribution to bus B
  output logic qc     // contribution to bus C (read)
);

  logic q;

  always_ff @(posedge clk) begin
    if (clr)      q <= CLR_VAL;
    else if (wrc) q <= dc;
  end

  assign qa = q & rda;
  assign qb = q & rdb;
  assign qc = q & rdc;

endmodule
