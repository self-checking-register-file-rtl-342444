// berger_pkg: sizes, types and helper functions shared by the self-checking
// register file.
//
// The register file stores 32-bit data words in a Data Register File (DRF) and
// their Berger check symbols in a separate Check Symbol Register File (CSRF).
// A Berger check symbol for I information bits has k = ceil(log2(I+1)) bits;
// for I = 32 this gives k = 6, matching the 32 x 6 bit CSRF. In this design
// the check symbol is the binary count of zeros in the data word (the scheme
// used by the bus checkers' zero counter).
//
// The operation set (read via A, via B, via C, write via C, clear) follows the
// register file's control lines. The encoding of rf_op_e, and the combined
// "read A and B while writing C" operation, are this design's own choices.
package berger_pkg;

  parameter int unsigned RF_NREGS  = 32;                // registers per file
  parameter int unsigned RF_DATA_W = 32;                // information bits I
  parameter int unsigned RF_ADDR_W = $clog2(RF_NREGS);  // register select width
  parameter int unsigned RF_CHK_W  = $clog2(RF_DATA_W + 1); // check bits k

  // Operations the control signal generator understands.
  typedef enum logic [2:0] {
    OP_NOP        = 3'd0,  // nothing selected
    OP_READ_A     = 3'd1,  // read register RSA onto bus A
    OP_READ_B     = 3'd2,  // read register RSB onto bus B
    OP_READ_AB    = 3'd3,  // read RSA onto bus A and RSB onto bus B
    OP_READ_C     = 3'd4,  // read register RSC onto bus C
    OP_WRITE      = 3'd5,  // write bus C into register RSC
    OP_CLEAR      = 3'd6,  // clear register RSC
    OP_READ_AB_WR = 3'd7   // read RSA/RSB onto A/B and write bus C into RSC
  } rf_op_e;

  // Command issued to a register file controller.
  typedef struct packed {
    rf_op_e              op;
    logic [RF_ADDR_W-1:0] rsa;  // register select, bus A
    logic [RF_ADDR_W-1:0] rsb;  // register select, bus B
    logic [RF_ADDR_W-1:0] rsc;  // register select, bus C
  } rf_cmd_t;

  // Operation lines and register selects delivered to one register file.
  typedef struct packed {
    logic                rda;  // read selected register via bus A
    logic                rdb;  // read selected register via bus B
    logic                rdc;  // read selected register via bus C
    logic                wrc;  // write selected register via bus C
    logic                clr;  // clear selected register
    logic [RF_ADDR_W-1:0] rsa;
    logic [RF_ADDR_W-1:0] rsb;
    logic [RF_ADDR_W-1:0] rsc;
  } rf_ctrl_t;

endpackage
