// asp_parallel: application-specific processor of parallel structure built
// around the ordered access memory.
//
// Three parts: the ordered access memory, a parallel ALU and a control unit.
// Input data arrive through LANES input ports and are written into the memory
// with indices formed by the control unit; intermediate rows go from the
// memory to the ALU through LANES ports, and the ALU's LANES results return
// into the memory with new indices, so each pass both computes and reorders
// the array. Finished rows leave through LANES output ports. The external
// controller loads the program and starts it (see asp_control_unit).
//
// Own choices: all four port groups have LANES ports; the memory is two
// oam_core banks used alternately, so that a pass can write its results
// while the array it reads is still intact; each bank has the capacity of the
// published core (1024 rows x 8 lanes x 32 bits by default).
//
// Status: hazard_stall and input_stall show the control unit holding an
// instruction; bank_full[b] shows that bank b has no free location row.
//
// Timing: LOAD rows are taken when in_valid and in_ready are both high.
// A row read by STORE appears on out_data with out_valid one cycle after the
// STORE issues. `rst` is asynchronous, active high.
module asp_parallel #(
  parameter int LANES      = 8,
  parameter int ROWS       = 1024,
  parameter int DATA_W     = 32,
  parameter int PROG_DEPTH = 16,
  parameter int ROW_W      = oam_pkg::idx_width(ROWS),
  parameter int COL_W      = oam_pkg::idx_width(LANES),
  parameter int PC_W       = oam_pkg::idx_width(PROG_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // external control
  input  logic               prog_we,
  input  logic [PC_W-1:0]    prog_addr,
  input  oam_pkg::cu_instr_t prog_instr,
  input  logic [ROW_W-1:0]   prog_row [LANES],
  input  logic [COL_W-1:0]   prog_col [LANES],
  input  logic               start,
  output logic               busy,
  output logic               done,
  // input data
  input  logic [DATA_W-1:0]  in_data [LANES],
  input  logic               in_valid,
  output logic               in_ready,
  // output data
  output logic [DATA_W-1:0]  out_data [LANES],
  output logic               out_valid,
  // status
  output logic               hazard_stall,
  output logic               input_stall,
  output logic               bank_full [2]
);
  import oam_pkg::*;

  logic             wr_en [2];
  logic             rd_en [2];
  logic             wr_from_alu, fetch_bank, fetch_to_out;
  logic [ROW_W-1:0] wr_row [LANES];
  logic [COL_W-1:0] wr_col [LANES];
  alu_op_e          alu_op;

  logic [DATA_W-1:0] wr_data  [LANES];
  logic [DATA_W-1:0] bank_out [2][LANES];
  logic              bank_valid [2];
  logic [DATA_W-1:0] fetched  [LANES];
  logic [DATA_W-1:0] alu_y    [LANES];

  asp_control_unit #(
    .LANES(LANES), .ROW_W(ROW_W), .COL_W(COL_W),
    .PROG_DEPTH(PROG_DEPTH), .PC_W(PC_W)
  ) u_cu (
    .clk, .rst,
    .prog_we, .prog_addr, .prog_instr, .prog_row, .prog_col,
    .start, .busy, .done,
    .in_valid, .in_ready,
    .wr_en, .wr_from_alu, .wr_row, .wr_col, .rd_en,
    .fetch_bank, .fetch_to_out,
    .alu_op, .hazard_stall, .input_stall
  );

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      fetched[i] = bank_out[fetch_bank][i];
      wr_data[i] = wr_from_alu ? alu_y[i] : in_data[i];
    end
  end

  oam_lane_alu #(.LANES(LANES), .DATA_W(DATA_W)) u_alu (
    .op(alu_op), .a(fetched), .y(alu_y)
  );

  for (genvar b = 0; b < 2; b++) begin : g_bank
    oam_core #(
      .IN_PORTS(LANES), .IN_ROWS(ROWS), .OUT_PORTS(LANES),
      .DATA_W(DATA_W), .OUT_ROWS(ROWS), .ROW_W(ROW_W), .COL_W(COL_W)
    ) u_oam (
      .clk, .rst,
      .wr_en   (wr_en[b]),
      .wr_row  (wr_row),
      .wr_col  (wr_col),
      .wr_data (wr_data),
      .rd_en   (rd_en[b]),
      .rd_data (bank_out[b]),
      .rd_valid(bank_valid[b]),
      .full    (bank_full[b])
    );
  end

  assign out_data  = fetched;
  assign out_valid = fetch_to_out && bank_valid[fetch_bank];

endmodule
