// oam_ip: ordered access memory IP core with the published pinout.
//
// CHANNELS data channels of DATA_W bits, a capacity of DEPTH x CHANNELS
// items (default 1024 x 8 x 32). With in_en high, rw high writes one row:
// channel j delivers io_data_in[j] together with its output-matrix index,
// row in_row[j] (K = 10 bits) and column in_col[j] (M = 3 bits). With in_en
// high and rw low the core reads the next row of the ordered output matrix;
// it appears on io_data_out one clock later, flagged by out_en. `set` is the
// reset, taken on its rising edge (asynchronous); it empties the memory and
// restarts both row sequences. The clock is rising-edge.
//
// The published core has a bidirectional data bus per channel. This design
// splits it into an input bus and an output bus, since a tri-state bus cannot
// be modelled in a two-state simulator and FPGA fabric has no internal
// tri-states anyway; a pad wrapper can merge them with out_en as the output
// enable. Storage, ordering and row sequencing are in oam_core.
module oam_ip #(
  parameter int CHANNELS = 8,
  parameter int DEPTH    = 1024,
  parameter int DATA_W   = 32,
  parameter int ROW_W    = oam_pkg::idx_width(DEPTH),
  parameter int COL_W    = oam_pkg::idx_width(CHANNELS)
) (
  input  logic              clk,
  input  logic              in_en,
  input  logic              rw,
  input  logic              set,
  input  logic [COL_W-1:0]  in_col      [CHANNELS],
  input  logic [ROW_W-1:0]  in_row      [CHANNELS],
  input  logic [DATA_W-1:0] io_data_in  [CHANNELS],
  output logic [DATA_W-1:0] io_data_out [CHANNELS],
  output logic              out_en
);

  logic full_unused;

  oam_core #(
    .IN_PORTS (CHANNELS),
    .IN_ROWS  (DEPTH),
    .OUT_PORTS(CHANNELS),
    .DATA_W   (DATA_W),
    .OUT_ROWS (DEPTH),
    .ROW_W    (ROW_W),
    .COL_W    (COL_W)
  ) u_core (
    .clk,
    .rst     (set),
    .wr_en   (in_en && rw),
    .wr_row  (in_row),
    .wr_col  (in_col),
    .wr_data (io_data_in),
    .rd_en   (in_en && !rw),
    .rd_data (io_data_out),
    .rd_valid(out_en),
    .full    (full_unused)
  );

endmodule
