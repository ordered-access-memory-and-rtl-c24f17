// oam_efd: entering-fetching device of the ordered access memory.
//
// Entering: each write strobe takes one row of the input matrix, IN_PORTS
// data items with their indices, and places it in the next free row of
// locations of the memory array. Locations are filled strictly in arrival
// order, so the writer never supplies an address.
//
// Fetching: each read strobe forms the next row of the output matrix. Every
// location compares its stored index with (current output row, column) and a
// matching location drives its data item onto output column `column`. Output
// rows are produced in order 0, 1, ... OUT_ROWS-1 and then wrap to 0, so the
// reader never supplies an address either. A column whose index was never
// written reads as zero. Indices within one array must be unique; should two
// locations carry the same index, the column returns the OR of their data.
//
// Array life cycle (own choice, the source only states that arrays are
// written, stored and read): the first write after any read starts a new
// array. It invalidates all locations, restarts entering at location row 0
// and restarts fetching at output row 0. Writes into a full array are
// dropped and `full` stays high until the next new array or reset.
//
// Timing: one input row per clock, one output row per clock. The row fetched
// by a read strobe in cycle c appears on rd_data with rd_valid in cycle c+1.
// A read in the same cycle as a write sees the array as it was before that
// write. `rst` is asynchronous and active high.
module oam_efd #(
  parameter int IN_PORTS  = 8,
  parameter int IN_ROWS   = 1024,
  parameter int OUT_PORTS = 8,
  parameter int DATA_W    = 32,
  parameter int OUT_ROWS  = (IN_PORTS * IN_ROWS + OUT_PORTS - 1) / OUT_PORTS,
  parameter int ROW_W     = oam_pkg::idx_width(OUT_ROWS),
  parameter int COL_W     = oam_pkg::idx_width(OUT_PORTS),
  parameter int ROWPTR_W  = oam_pkg::idx_width(IN_ROWS)
) (
  input  logic                      clk,
  input  logic                      rst,
  // input matrix row
  input  logic                      wr_en,
  input  logic [ROW_W-1:0]          wr_row   [IN_PORTS],
  input  logic [COL_W-1:0]          wr_col   [IN_PORTS],
  input  logic [DATA_W-1:0]         wr_data  [IN_PORTS],
  // output matrix row
  input  logic                      rd_en,
  output logic [DATA_W-1:0]         rd_data  [OUT_PORTS],
  output logic                      rd_valid,
  output logic                      full,
  // memory array, write side
  output logic                      arr_clear,
  output logic                      arr_we,
  output logic [ROWPTR_W-1:0]       arr_wr_row,
  output logic [ROW_W+COL_W-1:0]    arr_wr_idx  [IN_PORTS],
  output logic [DATA_W-1:0]         arr_wr_data [IN_PORTS],
  // memory array, all locations
  input  logic                      loc_valid[IN_PORTS*IN_ROWS],
  input  logic [ROW_W+COL_W-1:0]    loc_idx  [IN_PORTS*IN_ROWS],
  input  logic [DATA_W-1:0]         loc_data [IN_PORTS*IN_ROWS]
);

  localparam int P      = IN_PORTS * IN_ROWS;
  localparam int WPTR_W = oam_pkg::idx_width(IN_ROWS + 1);

  logic [WPTR_W-1:0] wp;          // location rows written in this array
  logic [ROW_W-1:0]  rp;          // next output row to fetch
  logic              read_phase;  // a read happened since the array started
  logic              new_array;

  // ---------------------------------------------------------------- entering
  assign full       = (int'(wp) >= IN_ROWS);
  assign new_array  = wr_en && read_phase;
  assign arr_clear  = new_array;
  assign arr_we     = wr_en && (new_array || !full);
  assign arr_wr_row = new_array ? '0 : ROWPTR_W'(wp);

  always_comb begin
    for (int j = 0; j < IN_PORTS; j++) begin
      arr_wr_idx[j]  = {wr_row[j], wr_col[j]};
      arr_wr_data[j] = wr_data[j];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wp         <= '0;
      rp         <= '0;
      read_phase <= 1'b0;
      rd_valid   <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      if (arr_we) wp <= WPTR_W'(arr_wr_row) + 1'b1;
      if (new_array) begin
        rp         <= '0;
        read_phase <= 1'b0;
      end else if (rd_en) begin
        rp         <= (int'(rp) == OUT_ROWS - 1) ? '0 : rp + 1'b1;
        read_phase <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- fetching
  // Each location whose index row equals the current output row steers its
  // data item to the output column named by its index column; the items of
  // all locations are merged per column by an OR (at most one matches).
  logic [DATA_W-1:0] fetch [OUT_PORTS];

  always_comb begin
    for (int t = 0; t < OUT_PORTS; t++) fetch[t] = '0;
    for (int p = 0; p < P; p++) begin
      if (loc_valid[p] && (loc_idx[p][ROW_W+COL_W-1:COL_W] == rp)) begin
        for (int t = 0; t < OUT_PORTS; t++) begin
          if (loc_idx[p][COL_W-1:0] == COL_W'(t)) fetch[t] = fetch[t] | loc_data[p];
        end
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int t = 0; t < OUT_PORTS; t++) rd_data[t] <= '0;
    end else if (rd_en) begin
      for (int t = 0; t < OUT_PORTS; t++) rd_data[t] <= fetch[t];
    end
  end

endmodule
