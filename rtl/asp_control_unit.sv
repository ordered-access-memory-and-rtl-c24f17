// asp_control_unit: control unit of the OAM-based processor of parallel
// structure.
//
// It runs a short program held in its own program memory, which the external
// controller loads through the prog_* port while the unit is idle. Each
// instruction (oam_pkg::cu_instr_t) says what the memory and the ALU do in one
// step; LOAD and PASS also carry one row and one column index per lane, which
// become the indices of the items written into the memory. So the unit forms
// the memory's control signals and data indices, the ALU's operation codes
// and the sequencing of the whole processor. Everything below the level of
// "control unit" (instruction set, program memory, two memory banks, hazard
// rules) is this design's own choice.
//
// The processor's memory is two OAM banks used in turn: a PASS reads the next
// output row of bank `bank` into the ALU and writes the result row into the
// other bank, so a whole array can be transformed and reordered in one sweep.
//
// Timing: one instruction issues per clock. LOAD waits for in_valid and
// acknowledges with in_ready in the same cycle. A PASS reads in its issue
// cycle c; the memory delivers the row in c+1, where the ALU (operation
// alu_op) processes it and the result is written (wr_en, wr_from_alu). A
// STORE reads in cycle c; the row leaves in c+1 (fetch_to_out). The unit
// stalls an instruction one cycle when it would touch the bank that the
// pending PASS result is being written into, or when a LOAD would collide with
// that write; HALT waits for the pending write and then raises done. `start`
// restarts the program at address 0. `rst` is asynchronous, active high.
module asp_control_unit #(
  parameter int LANES      = 8,
  parameter int ROW_W      = 10,
  parameter int COL_W      = 3,
  parameter int PROG_DEPTH = 16,
  parameter int PC_W       = oam_pkg::idx_width(PROG_DEPTH)
) (
  input  logic                clk,
  input  logic                rst,
  // external control: program load and start
  input  logic                prog_we,
  input  logic [PC_W-1:0]     prog_addr,
  input  oam_pkg::cu_instr_t  prog_instr,
  input  logic [ROW_W-1:0]    prog_row [LANES],
  input  logic [COL_W-1:0]    prog_col [LANES],
  input  logic                start,
  output logic                busy,
  output logic                done,
  // input data handshake
  input  logic                in_valid,
  output logic                in_ready,
  // memory control
  output logic                wr_en [2],
  output logic                wr_from_alu,
  output logic [ROW_W-1:0]    wr_row [LANES],
  output logic [COL_W-1:0]    wr_col [LANES],
  output logic                rd_en [2],
  output logic                fetch_bank,
  output logic                fetch_to_out,
  // ALU control
  output oam_pkg::alu_op_e    alu_op,
  // activity, for observation
  output logic                hazard_stall,
  output logic                input_stall
);
  import oam_pkg::*;

  cu_instr_t        prog_mem [PROG_DEPTH];
  logic [ROW_W-1:0] row_mem  [PROG_DEPTH][LANES];
  logic [COL_W-1:0] col_mem  [PROG_DEPTH][LANES];

  logic             running;
  logic [PC_W-1:0]  pc;
  cu_instr_t        instr;

  logic             pend_valid;
  logic             pend_bank;
  alu_op_e          pend_op;
  logic [ROW_W-1:0] pend_row [LANES];
  logic [COL_W-1:0] pend_col [LANES];

  logic             is_read, issue;

  // ------------------------------------------------------------ program store
  always_ff @(posedge clk) begin
    if (prog_we && !running) begin
      prog_mem[prog_addr] <= prog_instr;
      for (int i = 0; i < LANES; i++) begin
        row_mem[prog_addr][i] <= prog_row[i];
        col_mem[prog_addr][i] <= prog_col[i];
      end
    end
  end

  // ------------------------------------------------------------ issue logic
  assign instr   = prog_mem[pc];
  assign is_read = (instr.op == CU_PASS) || (instr.op == CU_STORE);

  always_comb begin
    hazard_stall = 1'b0;
    input_stall  = 1'b0;
    if (running && pend_valid) begin
      if (instr.op == CU_LOAD || instr.op == CU_HALT) hazard_stall = 1'b1;
      if (is_read && instr.bank == pend_bank)         hazard_stall = 1'b1;
    end
    if (running && !hazard_stall && instr.op == CU_LOAD && !in_valid) input_stall = 1'b1;
  end

  assign issue    = running && !hazard_stall && !input_stall;
  assign in_ready = issue && (instr.op == CU_LOAD);
  assign busy     = running;

  // Memory writes: a LOAD from the input ports, or the result of the PASS
  // issued in the previous cycle. The hazard rule keeps them apart.
  always_comb begin
    wr_en[0]    = 1'b0;
    wr_en[1]    = 1'b0;
    wr_from_alu = pend_valid;
    if (pend_valid) begin
      wr_en[pend_bank] = 1'b1;
      wr_row = pend_row;
      wr_col = pend_col;
    end else begin
      if (in_ready) wr_en[instr.bank] = 1'b1;
      wr_row = row_mem[pc];
      wr_col = col_mem[pc];
    end
    rd_en[0] = issue && is_read && (instr.bank == 1'b0);
    rd_en[1] = issue && is_read && (instr.bank == 1'b1);
  end

  assign alu_op = pend_op;

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      running      <= 1'b0;
      done         <= 1'b0;
      pc           <= '0;
      pend_valid   <= 1'b0;
      pend_bank    <= 1'b0;
      pend_op      <= ALU_PASS;
      fetch_bank   <= 1'b0;
      fetch_to_out <= 1'b0;
    end else begin
      pend_valid   <= 1'b0;
      fetch_to_out <= 1'b0;
      if (start && !running) begin
        running <= 1'b1;
        done    <= 1'b0;
        pc      <= '0;
      end else if (issue) begin
        pc <= pc + 1'b1;
        if (is_read) begin
          fetch_bank   <= instr.bank;
          fetch_to_out <= (instr.op == CU_STORE);
        end
        if (instr.op == CU_PASS) begin
          pend_valid <= 1'b1;
          pend_bank  <= !instr.bank;
          pend_op    <= instr.alu;
        end
        if (instr.op == CU_HALT) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (issue && instr.op == CU_PASS) begin
      pend_row <= row_mem[pc];
      pend_col <= col_mem[pc];
    end
  end

endmodule
