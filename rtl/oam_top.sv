// oam_top: the ordered access memory and the two processors built on it,
// side by side on one clock.
//
//   ip_*   : the OAM IP core (oam_ip), 8 channels x 1024 rows x 32 bits,
//            reset by its own ip_set input.
//   par_*  : the processor of parallel structure (asp_parallel): OAM, parallel
//            ALU and control unit, programmed through par_prog_*.
//   pipe_* : the processor of pipeline structure (asp_pipeline): a chain of
//            OAM + operating-unit stages, controlled per stage from outside.
//
// The three share only the clock; the two processors share the reset `rst`.
// Each block's interface and timing are described in its own file.
module oam_top #(
  parameter int CHANNELS   = 8,
  parameter int DEPTH      = 1024,
  parameter int DATA_W     = 32,
  parameter int PROG_DEPTH = 16,
  parameter int STAGES     = 3,
  parameter int ROW_W      = oam_pkg::idx_width(DEPTH),
  parameter int COL_W      = oam_pkg::idx_width(CHANNELS),
  parameter int PC_W       = oam_pkg::idx_width(PROG_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // OAM IP core
  input  logic               ip_in_en,
  input  logic               ip_rw,
  input  logic               ip_set,
  input  logic [COL_W-1:0]   ip_in_col      [CHANNELS],
  input  logic [ROW_W-1:0]   ip_in_row      [CHANNELS],
  input  logic [DATA_W-1:0]  ip_io_data_in  [CHANNELS],
  output logic [DATA_W-1:0]  ip_io_data_out [CHANNELS],
  output logic               ip_out_en,
  // parallel-structure processor
  input  logic               par_prog_we,
  input  logic [PC_W-1:0]    par_prog_addr,
  input  oam_pkg::cu_instr_t par_prog_instr,
  input  logic [ROW_W-1:0]   par_prog_row [CHANNELS],
  input  logic [COL_W-1:0]   par_prog_col [CHANNELS],
  input  logic               par_start,
  output logic               par_busy,
  output logic               par_done,
  input  logic [DATA_W-1:0]  par_in_data [CHANNELS],
  input  logic               par_in_valid,
  output logic               par_in_ready,
  output logic [DATA_W-1:0]  par_out_data [CHANNELS],
  output logic               par_out_valid,
  output logic               par_hazard_stall,
  output logic               par_input_stall,
  output logic               par_bank_full [2],
  // pipeline-structure processor
  input  logic [DATA_W-1:0]  pipe_id     [CHANNELS],
  input  logic               pipe_r      [STAGES],
  input  logic               pipe_w      [STAGES],
  input  logic [ROW_W-1:0]   pipe_oc_row [STAGES][CHANNELS],
  input  logic [COL_W-1:0]   pipe_oc_col [STAGES][CHANNELS],
  input  oam_pkg::alu_op_e   pipe_opc    [STAGES],
  output logic [DATA_W-1:0]  pipe_od     [CHANNELS],
  output logic               pipe_od_valid,
  output logic               pipe_full   [STAGES]
);

  oam_ip #(
    .CHANNELS(CHANNELS), .DEPTH(DEPTH), .DATA_W(DATA_W),
    .ROW_W(ROW_W), .COL_W(COL_W)
  ) u_ip (
    .clk,
    .in_en      (ip_in_en),
    .rw         (ip_rw),
    .set        (ip_set),
    .in_col     (ip_in_col),
    .in_row     (ip_in_row),
    .io_data_in (ip_io_data_in),
    .io_data_out(ip_io_data_out),
    .out_en     (ip_out_en)
  );

  asp_parallel #(
    .LANES(CHANNELS), .ROWS(DEPTH), .DATA_W(DATA_W), .PROG_DEPTH(PROG_DEPTH),
    .ROW_W(ROW_W), .COL_W(COL_W), .PC_W(PC_W)
  ) u_par (
    .clk, .rst,
    .prog_we     (par_prog_we),
    .prog_addr   (par_prog_addr),
    .prog_instr  (par_prog_instr),
    .prog_row    (par_prog_row),
    .prog_col    (par_prog_col),
    .start       (par_start),
    .busy        (par_busy),
    .done        (par_done),
    .in_data     (par_in_data),
    .in_valid    (par_in_valid),
    .in_ready    (par_in_ready),
    .out_data    (par_out_data),
    .out_valid   (par_out_valid),
    .hazard_stall(par_hazard_stall),
    .input_stall (par_input_stall),
    .bank_full   (par_bank_full)
  );

  asp_pipeline #(
    .STAGES(STAGES), .LANES(CHANNELS), .ROWS(DEPTH), .DATA_W(DATA_W),
    .ROW_W(ROW_W), .COL_W(COL_W)
  ) u_pipe (
    .clk, .rst,
    .id      (pipe_id),
    .r       (pipe_r),
    .w       (pipe_w),
    .oc_row  (pipe_oc_row),
    .oc_col  (pipe_oc_col),
    .opc     (pipe_opc),
    .od      (pipe_od),
    .od_valid(pipe_od_valid),
    .full    (pipe_full)
  );

endmodule
