// tb_asp_parallel: self-checking test of the parallel-structure processor.
//
// Reduced size: 4 lanes, 4 rows per bank, 16-bit data, 32-word program. The
// program loads a 4 x 4 array into bank 0 with random indices, runs two
// sweeps through the ALU (bank 0 -> bank 1 -> bank 0) with random operation
// codes and random reorderings, stores the result and halts. A reference
// model of the memory banks and the ALU predicts every output row. The input
// is held back at random, so input stalls occur, and the STORE that follows
// the last sweep must wait for the last result write (a hazard stall).
module tb_asp_parallel;
  import oam_pkg::*;
  localparam int L = 4, R = 4, DW = 16, PD = 32, N = L * R;
  localparam int RW = 2, CW = 2, PCW = 5;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic           prog_we = 0, start = 0, busy, done, in_valid = 0, in_ready, out_valid;
  logic [PCW-1:0] prog_addr = 0;
  cu_instr_t      prog_instr;
  logic [RW-1:0]  prog_row [L];
  logic [CW-1:0]  prog_col [L];
  logic [DW-1:0]  in_data  [L];
  logic [DW-1:0]  out_data [L];
  logic           hazard_stall, input_stall;
  logic           bank_full [2];

  asp_parallel #(.LANES(L), .ROWS(R), .DATA_W(DW), .PROG_DEPTH(PD)) dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_instr, .prog_row, .prog_col,
    .start, .busy, .done, .in_data, .in_valid, .in_ready, .out_data, .out_valid,
    .hazard_stall, .input_stall, .bank_full
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void shuffle(ref int p [N]);
    for (int i = 0; i < N; i++) p[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int q, t;
      q = $urandom_range(i, 0);
      t = p[i]; p[i] = p[q]; p[q] = t;
    end
  endfunction

  function automatic logic [DW-1:0] ref_alu(input int op, input logic [DW-1:0] a [L], input int i);
    case (op)
      0: return a[i];
      1: return (i % 2 == 0) ? a[i] + a[i+1] : a[i-1] - a[i];
      2: return -a[i];
      default: return {a[i][DW-1], a[i][DW-1:1]};
    endcase
  endfunction

  // reference model
  logic [DW-1:0] bank [2][N];
  logic [DW-1:0] src  [R][L];
  int pos [3][N];          // indices of LOAD, sweep 1, sweep 2
  int ops [2][R];
  logic [DW-1:0] expected [R][L];
  int n_out, n_hazard, n_input, cyc_start, cyc_done;

  task automatic put(input int addr, input cu_op_e op, input int alu, input bit b, input int set, input int row);
    @(negedge clk);
    prog_we = 1; prog_addr = PCW'(addr);
    prog_instr = '{op: op, alu: alu_op_e'(alu), bank: b};
    for (int i = 0; i < L; i++) begin
      prog_row[i] = RW'(pos[set][row*L+i] / L);
      prog_col[i] = CW'(pos[set][row*L+i] % L);
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (hazard_stall) n_hazard++;
      if (input_stall) n_input++;
      if (out_valid) begin
        for (int t = 0; t < L; t++)
          check(out_data[t] == expected[n_out][t],
                $sformatf("out row %0d col %0d = %h exp %h", n_out, t, out_data[t], expected[n_out][t]));
        n_out++;
      end
    end
  end

  initial begin
    logic [DW-1:0] row_in [L];
    int a;
    n_out = 0; n_hazard = 0; n_input = 0;
    for (int i = 0; i < L; i++) begin prog_row[i] = 0; prog_col[i] = 0; in_data[i] = 0; end
    prog_instr = '0;
    for (int s = 0; s < 3; s++) shuffle(pos[s]);
    for (int r = 0; r < R; r++) for (int i = 0; i < L; i++) src[r][i] = DW'($urandom);
    for (int s = 0; s < 2; s++) for (int r = 0; r < R; r++) ops[s][r] = $urandom_range(3, 0);

    // reference: LOAD into bank 0, sweep 0->1, sweep 1->0, store bank 0
    for (int r = 0; r < R; r++) for (int i = 0; i < L; i++) bank[0][pos[0][r*L+i]] = src[r][i];
    for (int s = 0; s < 2; s++) begin
      for (int r = 0; r < R; r++) begin
        for (int i = 0; i < L; i++) row_in[i] = bank[s][r*L+i];
        for (int i = 0; i < L; i++) bank[1-s][pos[s+1][r*L+i]] = ref_alu(ops[s][r], row_in, i);
      end
    end
    for (int r = 0; r < R; r++) for (int i = 0; i < L; i++) expected[r][i] = bank[0][r*L+i];

    repeat (2) @(negedge clk);
    rst = 0;
    a = 0;
    for (int r = 0; r < R; r++) put(a++, CU_LOAD, 0, 1'b0, 0, r);
    for (int r = 0; r < R; r++) put(a++, CU_PASS, ops[0][r], 1'b0, 1, r);
    for (int r = 0; r < R; r++) put(a++, CU_PASS, ops[1][r], 1'b1, 2, r);
    for (int r = 0; r < R; r++) put(a++, CU_STORE, 0, 1'b0, 0, r);
    put(a++, CU_HALT, 0, 1'b0, 0, 0);

    @(negedge clk);
    start = 1;
    cyc_start = int'($time / 10);
    @(negedge clk);
    start = 0;
    // feed input rows, sometimes late
    for (int r = 0; r < R; r++) begin
      while ($urandom_range(1, 0) == 1 || r == 1 && !in_valid) begin
        in_valid = 0;
        @(negedge clk);
        if (r == 1) break;
      end
      in_valid = 1;
      for (int i = 0; i < L; i++) in_data[i] = src[r][i];
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
      in_valid = 0;
    end
    wait (done);
    cyc_done = int'($time / 10);
    @(negedge clk);
    check(n_out == R, $sformatf("%0d output rows", n_out));
    check(n_hazard > 0, "a hazard stall happened");
    check(n_input > 0, "an input stall happened");
    check(!busy, "not busy after halt");
    $display("run: %0d cycles, %0d hazard stalls, %0d input stalls", cyc_done - cyc_start, n_hazard, n_input);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
