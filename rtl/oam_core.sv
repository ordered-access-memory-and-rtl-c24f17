// oam_core: ordered access memory, the memory array plus its entering-fetching
// device.
//
// The memory takes a data array as a matrix of IN_ROWS x IN_PORTS items,
// written one row per write strobe, each item with the index (row, column) of
// its place in the output matrix of OUT_ROWS x OUT_PORTS items. It returns
// the output matrix one row per read strobe, in row order. Neither side gives
// an address: the ordering is carried entirely by the indices, so all
// IN_PORTS inputs and all OUT_PORTS outputs are served in the same cycle
// without conflicts. Input and output port counts may differ; the capacity is
// P = IN_PORTS * IN_ROWS items on both sides.
//
// Defaults are the published core: 8 channels, 1024 rows, 32-bit data, a
// 10-bit row index and a 3-bit column index. Separate write and read strobes
// (instead of one read/write line) let the processors built on this core
// write and read in the same cycle; the life cycle of an array (a write after
// reads starts a new one) and the handling of full arrays are described in
// oam_efd.
//
// Timing: write data are stored at the rising edge of the strobe's cycle; a
// read strobe in cycle c delivers its row with rd_valid in cycle c+1. `rst` is
// asynchronous, active high.
module oam_core #(
  parameter int IN_PORTS  = 8,
  parameter int IN_ROWS   = 1024,
  parameter int OUT_PORTS = 8,
  parameter int DATA_W    = 32,
  parameter int OUT_ROWS  = (IN_PORTS * IN_ROWS + OUT_PORTS - 1) / OUT_PORTS,
  parameter int ROW_W     = oam_pkg::idx_width(OUT_ROWS),
  parameter int COL_W     = oam_pkg::idx_width(OUT_PORTS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,
  input  logic [ROW_W-1:0]  wr_row  [IN_PORTS],
  input  logic [COL_W-1:0]  wr_col  [IN_PORTS],
  input  logic [DATA_W-1:0] wr_data [IN_PORTS],
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data [OUT_PORTS],
  output logic              rd_valid,
  output logic              full
);

  localparam int P        = IN_PORTS * IN_ROWS;
  localparam int IDX_W    = ROW_W + COL_W;
  localparam int ROWPTR_W = oam_pkg::idx_width(IN_ROWS);

  logic                arr_clear, arr_we;
  logic [ROWPTR_W-1:0] arr_wr_row;
  logic [IDX_W-1:0]    arr_wr_idx  [IN_PORTS];
  logic [DATA_W-1:0]   arr_wr_data [IN_PORTS];
  logic                loc_valid [P];
  logic [IDX_W-1:0]    loc_idx   [P];
  logic [DATA_W-1:0]   loc_data  [P];

  oam_efd #(
    .IN_PORTS (IN_PORTS),
    .IN_ROWS  (IN_ROWS),
    .OUT_PORTS(OUT_PORTS),
    .DATA_W   (DATA_W),
    .OUT_ROWS (OUT_ROWS),
    .ROW_W    (ROW_W),
    .COL_W    (COL_W),
    .ROWPTR_W (ROWPTR_W)
  ) u_efd (
    .clk, .rst,
    .wr_en, .wr_row, .wr_col, .wr_data,
    .rd_en, .rd_data, .rd_valid, .full,
    .arr_clear, .arr_we, .arr_wr_row, .arr_wr_idx, .arr_wr_data,
    .loc_valid, .loc_idx, .loc_data
  );

  oam_memory_array #(
    .IN_PORTS(IN_PORTS),
    .IN_ROWS (IN_ROWS),
    .IDX_W   (IDX_W),
    .DATA_W  (DATA_W),
    .ROWPTR_W(ROWPTR_W)
  ) u_array (
    .clk, .rst,
    .clear  (arr_clear),
    .we     (arr_we),
    .wr_row (arr_wr_row),
    .wr_idx (arr_wr_idx),
    .wr_data(arr_wr_data),
    .loc_valid, .loc_idx, .loc_data
  );

endmodule
