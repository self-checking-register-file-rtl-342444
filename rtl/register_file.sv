// register_file: NREGS x WIDTH three-port register file with its own three
// address decoders, one per bus.
//
// Bus A's decoder takes RSA and RDA, bus B's takes RSB and RDB, bus C's takes
// RSC with RDC, WRC and CLR. Each register receives its five control lines
// from the decoders and drives its gated contents onto buses A, B and C; a bus
// is the OR of all registers' contributions, so an unselected bus reads 0.
// Reads are combinational in the cycle the command is present; a write or
// clear happens at the rising clock edge. Two buses may read the same register
// at once. Reading and writing one register in the same cycle is not a legal
// operation; the controller does not issue it and an assertion flags it here.
//
// The organisation (separate decoders per bus, RDA/RDB/RDC/WRC/CLR lines,
// write and clear via bus C) follows the document; the OR-bus and clocked
// write are this design's choices.
module register_file
  import berger_pkg::*;
#(
  parameter int unsigned      NREGS   = 32,
  parameter int unsigned      WIDTH   = 32,
  parameter int unsigned      GROUPS  = 8,
  parameter logic [WIDTH-1:0] CLR_VAL = '0
) (
  input  logic             clk,
  input  rf_ctrl_t         ctrl,     // operation lines and register selects
  input  logic [WIDTH-1:0] bus_c_in, // bus C, write data
  output logic [WIDTH-1:0] bus_a,
  output logic [WIDTH-1:0] bus_b,
  output logic [WIDTH-1:0] bus_c_out // bus C, read data
);

  localparam int unsigned AW = $clog2(NREGS);

  logic [NREGS-1:0][0:0] sel_a, sel_b;
  logic [NREGS-1:0][2:0] sel_c;        // {rdc, wrc, clr}

  address_decoder #(.NREGS(NREGS), .ADDR_W(AW), .OPS(1)) u_dec_a (
    .rs(ctrl.rsa[AW-1:0]), .op(ctrl.rda), .line(sel_a));
  address_decoder #(.NREGS(NREGS), .ADDR_W(AW), .OPS(1)) u_dec_b (
    .rs(ctrl.rsb[AW-1:0]), .op(ctrl.rdb), .line(sel_b));
  address_decoder #(.NREGS(NREGS), .ADDR_W(AW), .OPS(3)) u_dec_c (
    .rs(ctrl.rsc[AW-1:0]), .op({ctrl.rdc, ctrl.wrc, ctrl.clr}), .line(sel_c));

  logic [NREGS-1:0][WIDTH-1:0] qa, qb, qc;

  for (genvar r = 0; r < NREGS; r++) begin : g_reg
    rf_register #(.WIDTH(WIDTH), .GROUPS(GROUPS), .CLR_VAL(CLR_VAL)) u_reg (
      .clk (clk),
      .rda (sel_a[r][0]),
      .rdb (sel_b[r][0]),
      .rdc (sel_c[r][2]),
      .wrc (sel_c[r][1]),
      .clr (sel_c[r][0]),
      .dc  (bus_c_in),
      .qa  (qa[r]),
      .qb  (qb[r]),
      .qc  (qc[r])
    );
  end

  // Wired buses: at most one register drives each bus at a time.
  always_comb begin
    bus_a     = '0;
    bus_b     = '0;
    bus_c_out = '0;
    for (int r = 0; r < NREGS; r++) begin
      bus_a     |= qa[r];
      bus_b     |= qb[r];
      bus_c_out |= qc[r];
    end
  end

  // A register may not be read and written in the same cycle.
  a_no_rw_same_reg: assert property (@(posedge clk)
    (ctrl.wrc || ctrl.clr) |->
      !((ctrl.rda && ctrl.rsa == ctrl.rsc) || (ctrl.rdb && ctrl.rsb == ctrl.rsc) || ctrl.rdc))
    else $error("register_file: register %0d read and written in one cycle", ctrl.rsc);

endmodule
