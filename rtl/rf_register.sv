// rf_register: one register of a register file, built of WIDTH one-bit
// three-port cells arranged in GROUPS groups of WIDTH/GROUPS bits.
//
// Each of the five control lines coming from the address decoders (RDA, RDB,
// RDC, WRC, CLR for this register) is distributed through an inverter tree,
// so every group sees its own buffered copy. With GROUPS = 8 (a 32-bit data
// register of eight 4-bit cells) the line drives two inverters and each of
// those drives four more, one per 4-bit group: two inversions, so each group
// gets the line in its true polarity. With GROUPS = 1 (the 6-bit check symbol
// register) two inverters in cascade drive the whole register. Logically the
// tree is the identity; it is kept so the structure matches the physical
// register and each group has its own control copy.
//
// Interface: the five per-register control lines, bus C data in, and this
// register's contributions to buses A, B and C (zero when not read). Reads are
// combinational; writes and clears take effect at the rising clock edge.
//
// The grouping (eight 4-bit cells, or six single cells) and the inverter tree
// follow the document; CLR_VAL is this design's choice (see rf_bit_cell).
module rf_register #(
  parameter int unsigned      WIDTH   = 32,
  parameter int unsigned      GROUPS  = 8,
  parameter logic [WIDTH-1:0] CLR_VAL = '0
) (
  input  logic             clk,
  input  logic             rda,
  input  logic             rdb,
  input  logic             rdc,
  input  logic             wrc,
  input  logic             clr,
  input  logic [WIDTH-1:0] dc,
  output logic [WIDTH-1:0] qa,
  output logic [WIDTH-1:0] qb,
  output logic [WIDTH-1:0] qc
);

  localparam int unsigned GBITS = WIDTH / GROUPS;          // bits per group
  localparam int unsigned FIRST = (GROUPS > 1) ? 2 : 1;    // first-stage inverters
  localparam int unsigned PER   = GROUPS / FIRST;          // groups per first-stage inverter

  if (GBITS * GROUPS != WIDTH) begin : g_bad_groups
    $error("rf_register: WIDTH must be a multiple of GROUPS");
  end
  if (PER * FIRST != GROUPS) begin : g_bad_tree
    $error("rf_register: GROUPS must be 1 or even");
  end

  // Control lines bundled as {rda, rdb, rdc, wrc, clr}.
  logic [4:0] ctl;
  assign ctl = {rda, rdb, rdc, wrc, clr};

  // Stage 1: the decoder output drives FIRST inverters.
  logic [FIRST-1:0][4:0] stage1_n;
  // Stage 2: each stage-1 inverter drives PER inverters, one per group.
  logic [GROUPS-1:0][4:0] grp_ctl;

  always_comb begin
    for (int s = 0; s < FIRST; s++) stage1_n[s] = ~ctl;
    for (int g = 0; g < GROUPS; g++) grp_ctl[g] = ~stage1_n[g / PER];
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_group
    for (genvar b = 0; b < GBITS; b++) begin : g_bit
      localparam int unsigned IDX = g * GBITS + b;
      rf_bit_cell #(.CLR_VAL(CLR_VAL[IDX])) u_cell (
        .clk (clk),
        .rda (grp_ctl[g][4]),
        .rdb (grp_ctl[g][3]),
        .rdc (grp_ctl[g][2]),
        .wrc (grp_ctl[g][1]),
        .clr (grp_ctl[g][0]),
        .dc  (dc[IDX]),
        .qa  (qa[IDX]),
        .qb  (qb[IDX]),
        .qc  (qc[IDX])
      );
    end
  end

endmodule
