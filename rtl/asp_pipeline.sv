// asp_pipeline: application-specific processor of pipeline structure.
//
// STAGES stages in a chain; stage s is an ordered access memory OAM s followed
// by an operating unit OU s. OAM s receives a data array through its LANES
// input ports (stage 0 from the processor inputs id, later stages from the
// previous OU), stores it, orders it by the indices of its ordering code
// oc_row/oc_col (one row and one column index per port) and delivers the
// ordered rows to OU s, which applies operation code opc. The last OU drives
// the outputs od. The read strobe r[s], write strobe w[s], ordering code and
// operation code of every stage come from an external control device.
//
// Own choices: every stage has LANES input and LANES output ports and the
// capacity of the published core (1024 x 8 x 32 by default); STAGES = 3 is
// the smallest chain that runs an 8-point butterfly transform. The OUs are
// combinational, so the row that OAM s delivers one cycle after r[s] is
// written into OAM s+1 by a w[s+1] strobe in that same cycle.
//
// full[s] shows that OAM s has no free location row; further writes to it
// are dropped.
//
// Timing: od is valid (od_valid) one cycle after r[STAGES-1]. `rst` is
// asynchronous, active high.
module asp_pipeline #(
  parameter int STAGES = 3,
  parameter int LANES  = 8,
  parameter int ROWS   = 1024,
  parameter int DATA_W = 32,
  parameter int ROW_W  = oam_pkg::idx_width(ROWS),
  parameter int COL_W  = oam_pkg::idx_width(LANES)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] id     [LANES],
  input  logic              r      [STAGES],
  input  logic              w      [STAGES],
  input  logic [ROW_W-1:0]  oc_row [STAGES][LANES],
  input  logic [COL_W-1:0]  oc_col [STAGES][LANES],
  input  oam_pkg::alu_op_e  opc    [STAGES],
  output logic [DATA_W-1:0] od     [LANES],
  output logic              od_valid,
  output logic              full   [STAGES]
);

  logic [DATA_W-1:0] stage_in  [STAGES][LANES];
  logic [DATA_W-1:0] oam_out   [STAGES][LANES];
  logic [DATA_W-1:0] ou_out    [STAGES][LANES];
  logic              oam_valid [STAGES];

  assign stage_in[0] = id;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    if (s > 0) begin : g_link
      assign stage_in[s] = ou_out[s-1];
    end

    oam_core #(
      .IN_PORTS(LANES), .IN_ROWS(ROWS), .OUT_PORTS(LANES),
      .DATA_W(DATA_W), .OUT_ROWS(ROWS), .ROW_W(ROW_W), .COL_W(COL_W)
    ) u_oam (
      .clk, .rst,
      .wr_en   (w[s]),
      .wr_row  (oc_row[s]),
      .wr_col  (oc_col[s]),
      .wr_data (stage_in[s]),
      .rd_en   (r[s]),
      .rd_data (oam_out[s]),
      .rd_valid(oam_valid[s]),
      .full    (full[s])
    );

    oam_lane_alu #(.LANES(LANES), .DATA_W(DATA_W)) u_ou (
      .op(opc[s]), .a(oam_out[s]), .y(ou_out[s])
    );
  end

  assign od       = ou_out[STAGES-1];
  assign od_valid = oam_valid[STAGES-1];

endmodule
