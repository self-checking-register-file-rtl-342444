// csrf: the Check Symbol Register File, NREGS registers of CHK_W bits
// (32 x 6 by default) holding the Berger check symbol of the word stored in
// the same register of the data register file.
//
// Each register is CHK_W single one-bit three-port cells driven by two
// cascaded inverters per control line (rf_register with GROUPS = 1). The file
// has its own three address decoders, driven by the Checker Block Controller,
// so a fault in either file's decoders reads a data word and a check symbol
// from different registers, which the bus checkers then see as a mismatch.
// Buses A and B carry check symbols to checkers A and B; bus C carries the
// check symbol in (write) or out (read).
//
// CLR loads the check symbol of the all-zero word (DATA_W zeros, binary
// 100000 for 32-bit data) rather than zeros, so that a register cleared in
// both files still holds a valid code word. This is this design's choice: a
// literal all-zero check symbol would make every cleared register read back
// as an error. Size and structure follow the document.
module csrf
  import berger_pkg::*;
#(
  parameter int unsigned NREGS  = berger_pkg::RF_NREGS,
  parameter int unsigned DATA_W = berger_pkg::RF_DATA_W,
  parameter int unsigned CHK_W  = $clog2(DATA_W + 1)
) (
  input  logic             clk,
  input  rf_ctrl_t         ctrl,      // from the Checker Block Controller
  input  logic [CHK_W-1:0] bus_c_in,
  output logic [CHK_W-1:0] bus_a,
  output logic [CHK_W-1:0] bus_b,
  output logic [CHK_W-1:0] bus_c_out
);

  register_file #(
    .NREGS  (NREGS),
    .WIDTH  (CHK_W),
    .GROUPS (1),
    .CLR_VAL(CHK_W'(DATA_W))
  ) u_rf (
    .clk      (clk),
    .ctrl     (ctrl),
    .bus_c_in (bus_c_in),
    .bus_a    (bus_a),
    .bus_b    (bus_b),
    .bus_c_out(bus_c_out)
  );

endmodule
