// sc_regfile_top: self-checking register file with Berger-coded words and bus
// checkers working in parallel with the ALU.
//
// Every register holds a Berger code word: the data word in the data register
// file (drf) and its check symbol, the count of zeros, in the same register of
// the check symbol register file (csrf). Each file has its own three address
// decoders and its own controller (information block and checker block
// controllers), so a fault in either file's addressing or control returns a
// data word and a check symbol that do not belong together.
//
// Read path (operands, buses A and B): in the cycle a read command is
// presented, the selected words appear on the data buses and their check
// symbols on the check symbol buses. At the next rising clock edge the words
// are captured in the ALU input latches (alu_opa, alu_opb) and, at the same
// edge, the two-rail outputs of checker A and checker B are captured beside
// them. The ALU (outside this module) computes from the latches while the
// captured checker results drive the GO/STOP unit, which passes the ALU
// result on result_out only if both operands used were error free. err_a and
// err_b report an operand error to the control unit in that same cycle. The
// operand path therefore carries no checker delay.
//
// Write path (bus C): wr_data and wr_chk, a code word from the producer on
// bus C, are written into the two files at the rising edge of a WRITE cycle.
// CLEAR clears a register in both files; READ_C places a register's word and
// check symbol on rd_c_data and rd_c_chk in the same cycle.
//
// Timing: commands are sampled combinationally; writes land at the next edge;
// operand latches, checker results and error flags update at the edge after a
// read, so go/err describe the operands now in alu_opa/alu_opb. rst_n is a
// synchronous active-low reset of the latches only; the register files are
// initialised with CLEAR commands.
//
// The DRF/CSRF split, the per-file decoders and controllers, two checkers
// made of a zero counter and a two-rail checker, and checkers placed in
// parallel with the ALU feeding a GO/STOP unit follow the document. Taking
// the write check symbol from the bus C producer, the latch timing and the
// separate command inputs of the two controllers are this design's choices.
module sc_regfile_top
  import berger_pkg::*;
#(
  parameter int unsigned NREGS  = berger_pkg::RF_NREGS,
  parameter int unsigned DATA_W = berger_pkg::RF_DATA_W,
  parameter int unsigned CHK_W  = $clog2(DATA_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // Commands from the control unit, one per controller (normally equal).
  input  rf_cmd_t           info_cmd,
  input  rf_cmd_t           chk_cmd,
  // Bus C write code word.
  input  logic [DATA_W-1:0] wr_data,
  input  logic [CHK_W-1:0]  wr_chk,
  // Bus C read code word.
  output logic [DATA_W-1:0] rd_c_data,
  output logic [CHK_W-1:0]  rd_c_chk,
  // ALU interface.
  output logic [DATA_W-1:0] alu_opa,       // ALU input latch A
  output logic [DATA_W-1:0] alu_opb,       // ALU input latch B
  output logic              op_valid,      // latches hold freshly read operands
  input  logic [DATA_W-1:0] alu_result,    // ALU result from alu_opa/alu_opb
  output logic [DATA_W-1:0] result_out,    // result passed by GO/STOP
  output logic              result_go,     // result_out may be used
  output logic              result_stop,   // operands faulty, result blocked
  // Error signals to the control unit.
  output logic              err_a,         // operand on bus A failed its check
  output logic              err_b,         // operand on bus B failed its check
  output logic              ctrl_conflict  // a command asked to read and write one register
);

  rf_ctrl_t info_ctrl, chk_ctrl;
  logic     info_conflict, chk_conflict;

  rf_controller u_info_ctrl (.cmd(info_cmd), .ctrl(info_ctrl), .conflict(info_conflict));
  rf_controller u_chk_ctrl  (.cmd(chk_cmd),  .ctrl(chk_ctrl),  .conflict(chk_conflict));

  logic [DATA_W-1:0] d_bus_a, d_bus_b;
  logic [CHK_W-1:0]  c_bus_a, c_bus_b;

  drf #(.NREGS(NREGS), .DATA_W(DATA_W)) u_drf (
    .clk      (clk),
    .ctrl     (info_ctrl),
    .bus_c_in (wr_data),
    .bus_a    (d_bus_a),
    .bus_b    (d_bus_b),
    .bus_c_out(rd_c_data)
  );

  csrf #(.NREGS(NREGS), .DATA_W(DATA_W), .CHK_W(CHK_W)) u_csrf (
    .clk      (clk),
    .ctrl     (chk_ctrl),
    .bus_c_in (wr_chk),
    .bus_a    (c_bus_a),
    .bus_b    (c_bus_b),
    .bus_c_out(rd_c_chk)
  );

  // Checkers A and B, in parallel with the ALU input latches.
  logic [1:0]       z_a, z_b;
  logic             chk_err_a, chk_err_b;

  bus_checker #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_checker_a (
    .data(d_bus_a), .stored_chk(c_bus_a), .gen_chk(), .z(z_a), .error(chk_err_a));
  bus_checker #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_checker_b (
    .data(d_bus_b), .stored_chk(c_bus_b), .gen_chk(), .z(z_b), .error(chk_err_b));

  // A bus is in use when either file was told to drive it.
  logic use_a, use_b;
  assign use_a = info_ctrl.rda | chk_ctrl.rda;
  assign use_b = info_ctrl.rdb | chk_ctrl.rdb;

  // ALU input latches with the checker results captured beside them.
  logic [1:0] z_a_q, z_b_q;
  logic       use_a_q, use_b_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alu_opa  <= '0;
      alu_opb  <= '0;
      z_a_q    <= 2'b10;
      z_b_q    <= 2'b10;
      use_a_q  <= 1'b0;
      use_b_q  <= 1'b0;
      op_valid <= 1'b0;
    end else begin
      op_valid <= use_a | use_b;
      use_a_q  <= use_a;
      use_b_q  <= use_b;
      if (use_a) begin
        alu_opa <= d_bus_a;
        z_a_q   <= z_a;
      end
      if (use_b) begin
        alu_opb <= d_bus_b;
        z_b_q   <= z_b;
      end
    end
  end

  assign err_a = use_a_q & ~(z_a_q[1] ^ z_a_q[0]);
  assign err_b = use_b_q & ~(z_b_q[1] ^ z_b_q[0]);

  go_stop #(.DATA_W(DATA_W)) u_go_stop (
    .pair_a    (z_a_q),
    .pair_b    (z_b_q),
    .use_a     (use_a_q),
    .use_b     (use_b_q),
    .result_in (alu_result),
    .go        (result_go),
    .stop      (result_stop),
    .result_out(result_out)
  );

  assign ctrl_conflict = info_conflict | chk_conflict;

endmodule
