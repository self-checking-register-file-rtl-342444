// drf: the Data Register File, NREGS general purpose registers of DATA_W bits
// (32 x 32 by default) holding the information part of each Berger code word.
//
// Each register is eight 4-bit cells, each cell four one-bit three-port cells,
// with the control-line inverter tree of rf_register (GROUPS = 8). The file
// has its own three address decoders, driven by the Information Block
// Controller; buses A and B carry operands out, bus C carries data in (write)
// or out (read). CLR clears a register to all zeros. Reads are combinational;
// writes and clears happen at the rising clock edge.
//
// Size, grouping and decoders follow the document.
module drf
  import berger_pkg::*;
#(
  parameter int unsigned NREGS  = berger_pkg::RF_NREGS,
  parameter int unsigned DATA_W = berger_pkg::RF_DATA_W
) (
  input  logic              clk,
  input  rf_ctrl_t          ctrl,      // from the Information Block Controller
  input  logic [DATA_W-1:0] bus_c_in,
  output logic [DATA_W-1:0] bus_a,
  output logic [DATA_W-1:0] bus_b,
  output logic [DATA_W-1:0] bus_c_out
);

  register_file #(
    .NREGS  (NREGS),
    .WIDTH  (DATA_W),
    .GROUPS (DATA_W / 4),
    .CLR_VAL('0)
  ) u_rf (
    .clk      (clk),
    .ctrl     (ctrl),
    .bus_c_in (bus_c_in),
    .bus_a    (bus_a),
    .bus_b    (bus_b),
    .bus_c_out(bus_c_out)
  );

endmodule
