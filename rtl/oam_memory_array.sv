// oam_memory_array: the location store of the ordered access memory.
//
// The array has P = IN_PORTS * IN_ROWS locations. Each location keeps a data
// item, the index of that item in the output matrix and a valid bit. Data
// enter by rows of the input matrix: one write stores IN_PORTS items with
// their indices in the IN_PORTS locations of location row `wr_row`, chosen by
// the entering-fetching device in arrival order; no address comes from
// outside. All locations are visible at once on the loc_* outputs so that the
// fetching side can compare every stored index in parallel.
//
// The split into a memory array of (index, data item) locations and a
// separate entering-fetching device follows the OAM organization. Holding the
// locations in flip-flops rather than a RAM macro follows the register-based
// FPGA implementation; the valid bit and the clear input are this design's
// own additions, used to start a new array.
//
// Timing: a write and a clear take effect at the rising clock edge. `clear`
// drops every valid bit; a write in the same cycle still lands. `rst` is
// asynchronous and clears the valid bits only; index and data bits are not
// reset because a location is never read while invalid.
module oam_memory_array #(
  parameter int IN_PORTS = 8,
  parameter int IN_ROWS  = 1024,
  parameter int IDX_W    = 13,
  parameter int DATA_W   = 32,
  parameter int ROWPTR_W = oam_pkg::idx_width(IN_ROWS)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                we,
  input  logic [ROWPTR_W-1:0] wr_row,
  input  logic [IDX_W-1:0]    wr_idx   [IN_PORTS],
  input  logic [DATA_W-1:0]   wr_data  [IN_PORTS],
  output logic                loc_valid[IN_PORTS*IN_ROWS],
  output logic [IDX_W-1:0]    loc_idx  [IN_PORTS*IN_ROWS],
  output logic [DATA_W-1:0]   loc_data [IN_PORTS*IN_ROWS]
);

  localparam int P = IN_PORTS * IN_ROWS;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int p = 0; p < P; p++) loc_valid[p] <= 1'b0;
    end else begin
      if (clear) begin
        for (int p = 0; p < P; p++) loc_valid[p] <= 1'b0;
      end
      if (we && (int'(wr_row) < IN_ROWS)) begin
        for (int j = 0; j < IN_PORTS; j++) loc_valid[int'(wr_row) * IN_PORTS + j] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we && (int'(wr_row) < IN_ROWS)) begin
      for (int j = 0; j < IN_PORTS; j++) begin
        loc_idx [int'(wr_row) * IN_PORTS + j] <= wr_idx[j];
        loc_data[int'(wr_row) * IN_PORTS + j] <= wr_data[j];
      end
    end
  end

endmodule
