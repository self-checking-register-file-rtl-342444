// rf_controller: control signal generator for one register file.
//
// Two instances exist: the Information Block Controller drives the data
// register file and the Checker Block Controller drives the check symbol
// register file. Both receive the same command and produce the same lines, so
// any disagreement between them makes the two files do different things,
// which the bus checkers detect on the next read.
//
// It decodes the command's operation into the operation lines RDA, RDB, RDC,
// WRC and CLR and forwards the register selects RSA, RSB and RSC. A command
// that would read and write (or clear) the same register in one cycle is not
// allowed: the write is dropped and conflict is raised. Purely combinational.
//
// The operation lines and the read/write rule follow the document; the
// command encoding (berger_pkg::rf_op_e) and dropping a conflicting write are
// this design's choices.
module rf_controller
  import berger_pkg::*;
(
  input  rf_cmd_t  cmd,
  output rf_ctrl_t ctrl,
  output logic     conflict   // command asked to read and write one register
);

  logic rda, rdb, rdc, wrc, clr;

  always_comb begin
    rda = 1'b0; rdb = 1'b0; rdc = 1'b0; wrc = 1'b0; clr = 1'b0;
    unique case (cmd.op)
      OP_NOP:        ;
      OP_READ_A:     rda = 1'b1;
      OP_READ_B:     rdb = 1'b1;
      OP_READ_AB:    begin rda = 1'b1; rdb = 1'b1; end
      OP_READ_C:     rdc = 1'b1;
      OP_WRITE:      wrc = 1'b1;
      OP_CLEAR:      clr = 1'b1;
      OP_READ_AB_WR: begin rda = 1'b1; rdb = 1'b1; wrc = 1'b1; end
      default:       ;
    endcase

    conflict = wrc && ((rda && cmd.rsa == cmd.rsc) || (rdb && cmd.rsb == cmd.rsc));

    ctrl.rda = rda;
    ctrl.rdb = rdb;
    ctrl.rdc = rdc;
    ctrl.wrc = wrc && !conflict;
    ctrl.clr = clr;
    ctrl.rsa = cmd.rsa;
    ctrl.rsb = cmd.rsb;
    ctrl.rsc = cmd.rsc;
  end

endmodule
