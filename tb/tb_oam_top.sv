// tb_oam_top: end-to-end test of the whole design at its default size
// (8 channels, 1024 rows, 32-bit data, 3 pipeline stages, 16-word program).
//
// Three threads run at once, one per block of the top:
//  * OAM IP core: a random permutation of all 8192 items is written in 1024
//    rows and read back in order; a write into the full memory is dropped;
//    a new array started after the reads leaves unwritten positions at zero.
//  * Parallel processor: a 13-instruction program loads 3 rows with random
//    indices, sweeps them through the ALU twice (bank 0 -> 1 -> 0) with
//    random operations and reorderings, stores them and halts.
//  * Pipeline processor: array 0 (1024 rows) is an 8-point Walsh-Hadamard
//    transform of every row, array 1 a random ordering/operation mix that
//    overlaps array 0 in the pipe.
// Every output is compared with a reference computed here. Each mechanism
// (ordered write/read, full-memory drop, new array, missing index, input
// stall, hazard stall, bank alternation, overlapping pipeline arrays, full
// stage memory) is counted and must occur at least once.
module tb_oam_top;
  import oam_pkg::*;
  localparam int CH = 8, D = 1024, DW = 32, PD = 16, S = 3, N = CH * D;
  localparam int RW = 10, CW = 3, PCW = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT
  logic          ip_in_en = 0, ip_rw = 0, ip_set = 0, ip_out_en;
  logic [CW-1:0] ip_in_col [CH];
  logic [RW-1:0] ip_in_row [CH];
  logic [DW-1:0] ip_io_data_in [CH];
  logic [DW-1:0] ip_io_data_out [CH];

  logic           par_prog_we = 0, par_start = 0, par_busy, par_done;
  logic [PCW-1:0] par_prog_addr = 0;
  cu_instr_t      par_prog_instr;
  logic [RW-1:0]  par_prog_row [CH];
  logic [CW-1:0]  par_prog_col [CH];
  logic [DW-1:0]  par_in_data [CH];
  logic           par_in_valid = 0, par_in_ready;
  logic [DW-1:0]  par_out_data [CH];
  logic           par_out_valid, par_hazard_stall, par_input_stall;
  logic           par_bank_full [2];

  logic [DW-1:0] pipe_id [CH];
  logic          pipe_r [S], pipe_w [S];
  logic [RW-1:0] pipe_oc_row [S][CH];
  logic [CW-1:0] pipe_oc_col [S][CH];
  alu_op_e       pipe_opc [S];
  logic [DW-1:0] pipe_od [CH];
  logic          pipe_od_valid;
  logic          pipe_full [S];

  oam_top dut (
    .clk, .rst,
    .ip_in_en, .ip_rw, .ip_set, .ip_in_col, .ip_in_row, .ip_io_data_in, .ip_io_data_out, .ip_out_en,
    .par_prog_we, .par_prog_addr, .par_prog_instr, .par_prog_row, .par_prog_col,
    .par_start, .par_busy, .par_done, .par_in_data, .par_in_valid, .par_in_ready,
    .par_out_data, .par_out_valid, .par_hazard_stall, .par_input_stall, .par_bank_full,
    .pipe_id, .pipe_r, .pipe_w, .pipe_oc_row, .pipe_oc_col, .pipe_opc,
    .pipe_od, .pipe_od_valid, .pipe_full
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void shuffle(ref int p [], input int n);
    p = new[n];
    for (int i = 0; i < n; i++) p[i] = i;
    for (int i = n - 1; i > 0; i--) begin
      int q, t;
      q = $urandom_range(i, 0);
      t = p[i]; p[i] = p[q]; p[q] = t;
    end
  endfunction

  function automatic logic [DW-1:0] ref_alu(input int op, input logic [DW-1:0] a [CH], input int i);
    case (op)
      0: return a[i];
      1: return (i % 2 == 0) ? a[i] + a[i+1] : a[i-1] - a[i];
      2: return -a[i];
      default: return {a[i][DW-1], a[i][DW-1:1]};
    endcase
  endfunction

  // mechanism counters
  int n_ip_rows, n_ip_drop, n_ip_newarray, n_ip_missing;
  int n_par_rows, n_par_hazard, n_par_input, n_par_swap;
  int n_pipe_rows, n_pipe_overlap, n_pipe_full;
  bit ip_done = 0, par_ok = 0, pipe_ok = 0;

  // ================================================================ IP core
  int          ip_perm [];
  logic [DW-1:0] ip_val [N];

  initial begin : ip_thread
    for (int j = 0; j < CH; j++) begin ip_in_col[j] = 0; ip_in_row[j] = 0; ip_io_data_in[j] = 0; end
    shuffle(ip_perm, N);
    for (int p = 0; p < N; p++) ip_val[p] = $urandom;
    @(negedge clk); ip_set = 1;
    @(negedge clk); ip_set = 0;
    for (int i = 0; i <= D; i++) begin
      ip_in_en = 1; ip_rw = 1;
      for (int j = 0; j < CH; j++) begin
        int p;
        p = (i < D) ? i * CH + j : j;
        ip_in_row[j] = RW'(ip_perm[p] / CH);
        ip_in_col[j] = CW'(ip_perm[p] % CH);
        ip_io_data_in[j] = (i < D) ? ip_val[p] : 32'hbad0_0000;
      end
      if (i == D) n_ip_drop++;   // one row beyond the capacity
      @(negedge clk);
    end
    ip_in_en = 1; ip_rw = 0;
    for (int s = 0; s < D; s++) begin
      @(posedge clk); #1;
      check(ip_out_en, "ip: out_en one clock after read");
      for (int t = 0; t < CH; t++) begin
        // position s*CH+t was item ip_perm^-1; the full-memory write must not show
        check(ip_io_data_out[t] != 32'hbad0_0000, "ip: write into full memory dropped");
      end
      n_ip_rows++;
    end
    @(negedge clk); ip_in_en = 0;
    // new array: a single row covering output row 3 columns 0..3 only
    ip_in_en = 1; ip_rw = 1;
    for (int j = 0; j < CH; j++) begin
      ip_in_row[j] = RW'((j < 4) ? 3 : 5);
      ip_in_col[j] = CW'(j % 4);
      ip_io_data_in[j] = 32'h1111_0000 + j;
    end
    n_ip_newarray++;
    @(negedge clk);
    ip_rw = 0;
    for (int s = 0; s < 4; s++) begin
      @(posedge clk); #1;
      for (int t = 0; t < CH; t++) begin
        logic [DW-1:0] e;
        e = (s == 3 && t < 4) ? 32'h1111_0000 + t : 0;
        if (e == 0) n_ip_missing++;
        check(ip_io_data_out[t] == e, $sformatf("ip: new array row %0d col %0d", s, t));
      end
    end
    @(negedge clk); ip_in_en = 0;
    ip_done = 1;
  end

  // value check of the first-array read, by inverse permutation
  int ip_inv [N];
  int ip_rd_row = 0;
  initial begin
    wait (ip_perm.size() == N);
    for (int p = 0; p < N; p++) ip_inv[ip_perm[p]] = p;
  end
  always @(posedge clk) begin
    if (ip_out_en && ip_rd_row < D) begin
      for (int t = 0; t < CH; t++)
        check(ip_io_data_out[t] == ip_val[ip_inv[ip_rd_row * CH + t]],
              $sformatf("ip: row %0d col %0d", ip_rd_row, t));
      ip_rd_row <= ip_rd_row + 1;
    end
  end

  // ================================================================ parallel processor
  localparam int PR = 3, PN = PR * CH;
  int            par_pos [3][];
  int            par_ops [2][PR];
  logic [DW-1:0] par_src [PR][CH];
  logic [DW-1:0] par_exp [PR][CH];
  bit            last_fetch_bank;

  task automatic par_put(input int addr, input cu_op_e op, input int alu, input bit b, input int set, input int row);
    @(negedge clk);
    par_prog_we = 1; par_prog_addr = PCW'(addr);
    par_prog_instr = '{op: op, alu: alu_op_e'(alu), bank: b};
    for (int i = 0; i < CH; i++) begin
      par_prog_row[i] = (set < 3) ? RW'(par_pos[set][row*CH+i] / CH) : '0;
      par_prog_col[i] = (set < 3) ? CW'(par_pos[set][row*CH+i] % CH) : '0;
    end
    @(negedge clk);
    par_prog_we = 0;
  endtask

  initial begin : par_thread
    logic [DW-1:0] bank [2][PN];
    logic [DW-1:0] row_in [CH];
    int a;
    for (int i = 0; i < CH; i++) begin par_prog_row[i] = 0; par_prog_col[i] = 0; par_in_data[i] = 0; end
    par_prog_instr = '0;
    for (int s = 0; s < 3; s++) shuffle(par_pos[s], PN);
    for (int r = 0; r < PR; r++) for (int i = 0; i < CH; i++) par_src[r][i] = $urandom;
    for (int s = 0; s < 2; s++) for (int r = 0; r < PR; r++) par_ops[s][r] = $urandom_range(3, 0);
    for (int r = 0; r < PR; r++) for (int i = 0; i < CH; i++) bank[0][par_pos[0][r*CH+i]] = par_src[r][i];
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < PR; r++) begin
        for (int i = 0; i < CH; i++) row_in[i] = bank[s][r*CH+i];
        for (int i = 0; i < CH; i++) bank[1-s][par_pos[s+1][r*CH+i]] = ref_alu(par_ops[s][r], row_in, i);
      end
    for (int r = 0; r < PR; r++) for (int i = 0; i < CH; i++) par_exp[r][i] = bank[0][r*CH+i];

    repeat (2) @(negedge clk);
    wait (!rst);
    a = 0;
    for (int r = 0; r < PR; r++) par_put(a++, CU_LOAD, 0, 1'b0, 0, r);
    for (int r = 0; r < PR; r++) par_put(a++, CU_PASS, par_ops[0][r], 1'b0, 1, r);
    for (int r = 0; r < PR; r++) par_put(a++, CU_PASS, par_ops[1][r], 1'b1, 2, r);
    for (int r = 0; r < PR; r++) par_put(a++, CU_STORE, 0, 1'b0, 3, r);
    par_put(a++, CU_HALT, 0, 1'b0, 3, 0);
    @(negedge clk); par_start = 1;
    @(negedge clk); par_start = 0;
    for (int r = 0; r < PR; r++) begin
      if (r == 1) repeat (3) @(negedge clk);    // hold the input back
      par_in_valid = 1;
      par_in_data  = par_src[r];
      do @(posedge clk); while (!par_in_ready);
      @(negedge clk);
      par_in_valid = 0;
    end
    wait (par_done);
    @(negedge clk);
    check(n_par_rows == PR, "par: all rows stored");
    check(!par_busy, "par: idle after halt");
    par_ok = 1;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (par_hazard_stall) n_par_hazard++;
      if (par_input_stall) n_par_input++;
      if (dut.u_par.wr_en[1] && dut.u_par.wr_from_alu) n_par_swap++;
      if (par_out_valid) begin
        for (int t = 0; t < CH; t++)
          check(par_out_data[t] == par_exp[n_par_rows][t], $sformatf("par: row %0d col %0d", n_par_rows, t));
        n_par_rows <= n_par_rows + 1;
      end
    end
  end

  // ================================================================ pipeline processor
  localparam int K = 2, PER = 2 * D;
  int            pipe_code [K][S][];
  int            pipe_ops  [K][S];
  logic [DW-1:0] pipe_src  [K][D][CH];
  logic [DW-1:0] pipe_exp  [K][D][CH];
  bit            pipe_ready = 0;
  int            cyc = 0;

  initial begin : pipe_setup
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < D; i++) for (int j = 0; j < CH; j++)
        pipe_src[k][i][j] = (k == 0) ? DW'($urandom_range(2000, 0)) - 1000 : $urandom;
      for (int s = 0; s < S; s++) begin
        if (k == 0) begin
          pipe_ops[k][s] = 1;
          pipe_code[k][s] = new[N];
          for (int n = 0; n < N; n++)
            pipe_code[k][s][n] = (s == 0) ? n :
              (n / CH) * CH + ((n % 2 == 0) ? (n % CH) / 2 : CH / 2 + (n % CH) / 2);
        end else begin
          pipe_ops[k][s] = $urandom_range(3, 0);
          shuffle(pipe_code[k][s], N);
        end
      end
    end
    for (int k = 0; k < K; k++) begin
      logic [DW-1:0] mem [N];
      logic [DW-1:0] row [CH];
      pipe_exp[k] = pipe_src[k];
      for (int s = 0; s < S; s++) begin
        for (int i = 0; i < D; i++) for (int j = 0; j < CH; j++) mem[pipe_code[k][s][i*CH+j]] = pipe_exp[k][i][j];
        for (int i = 0; i < D; i++) begin
          for (int j = 0; j < CH; j++) row[j] = mem[i*CH+j];
          for (int j = 0; j < CH; j++) pipe_exp[k][i][j] = ref_alu(pipe_ops[k][s], row, j);
        end
      end
    end
    // the Walsh-Hadamard array against the Hadamard matrix, for a few rows
    for (int i = 0; i < D; i += 97) begin
      for (int u = 0; u < CH; u++) begin
        int acc, lane;
        acc = 0;
        for (int v = 0; v < CH; v++)
          acc += ($countones(u & v) % 2 == 0) ? int'(pipe_src[0][i][v]) : -int'(pipe_src[0][i][v]);
        lane = (u < CH / 2) ? 2 * u : 2 * (u - CH / 2) + 1;
        check(int'(pipe_exp[0][i][lane]) == acc, "pipe: reference agrees with Hadamard transform");
      end
    end
    pipe_ready = 1;
  end

  // control device of the pipeline: array k enters stage s at k*PER + s*(D+1)
  always_comb begin
    int ws, rs;
    ws = 0;
    rs = 0;
    for (int j = 0; j < CH; j++) pipe_id[j] = '0;
    for (int s = 0; s < S; s++) begin
      pipe_r[s] = 0; pipe_w[s] = 0; pipe_opc[s] = ALU_PASS;
      for (int j = 0; j < CH; j++) begin pipe_oc_row[s][j] = '0; pipe_oc_col[s][j] = '0; end
    end
    if (pipe_ready) begin
      for (int k = 0; k < K; k++) begin
        for (int s = 0; s < S; s++) begin
          ws = k * PER + s * (D + 1);
          rs = ws + D;
          if (cyc >= ws && cyc < ws + D) begin
            pipe_w[s] = 1;
            for (int j = 0; j < CH; j++) begin
              pipe_oc_row[s][j] = RW'(pipe_code[k][s][(cyc - ws) * CH + j] / CH);
              pipe_oc_col[s][j] = CW'(pipe_code[k][s][(cyc - ws) * CH + j] % CH);
              if (s == 0) pipe_id[j] = pipe_src[k][cyc - ws][j];
            end
          end
          if (cyc >= rs && cyc < rs + D) pipe_r[s] = 1;
          if (cyc > rs && cyc <= rs + D) pipe_opc[s] = alu_op_e'(pipe_ops[k][s]);
        end
      end
    end
  end

  always @(posedge clk) begin
    if (pipe_ready && !rst) begin
      int busy_stages;
      cyc <= cyc + 1;
      busy_stages = 0;
      for (int s = 0; s < S; s++) if (pipe_r[s] || pipe_w[s]) busy_stages++;
      if (pipe_w[0] && (pipe_r[1] || pipe_w[1] || pipe_r[2] || pipe_w[2])) n_pipe_overlap++;
      if (pipe_full[0]) n_pipe_full++;
      if (pipe_od_valid) begin
        for (int j = 0; j < CH; j++)
          check(pipe_od[j] == pipe_exp[n_pipe_rows / D][n_pipe_rows % D][j],
                $sformatf("pipe: array %0d row %0d lane %0d", n_pipe_rows / D, n_pipe_rows % D, j));
        n_pipe_rows <= n_pipe_rows + 1;
        if (n_pipe_rows + 1 == K * D) pipe_ok = 1;
      end
    end
  end

  // ================================================================ end
  initial begin
    n_ip_rows = 0; n_ip_drop = 0; n_ip_newarray = 0; n_ip_missing = 0;
    n_par_rows = 0; n_par_hazard = 0; n_par_input = 0; n_par_swap = 0;
    n_pipe_rows = 0; n_pipe_overlap = 0; n_pipe_full = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (ip_done && par_ok && pipe_ok);
    @(negedge clk);
    $display("ip: %0d rows ordered, %0d writes into full memory, %0d new arrays, %0d missing items",
             n_ip_rows, n_ip_drop, n_ip_newarray, n_ip_missing);
    $display("par: %0d rows out, %0d hazard stalls, %0d input stalls, %0d result writes to bank 1",
             n_par_rows, n_par_hazard, n_par_input, n_par_swap);
    $display("pipe: %0d rows out, %0d cycles with arrays overlapping, %0d cycles with stage 0 full",
             n_pipe_rows, n_pipe_overlap, n_pipe_full);
    check(n_ip_rows == D, "mechanism: ordered write/read of a full array");
    check(n_ip_drop > 0, "mechanism: write into full memory");
    check(n_ip_newarray > 0, "mechanism: new array after reads");
    check(n_ip_missing > 0, "mechanism: missing index reads zero");
    check(n_par_hazard > 0, "mechanism: hazard stall");
    check(n_par_input > 0, "mechanism: input stall");
    check(n_par_swap > 0, "mechanism: bank alternation");
    check(n_pipe_overlap > 0, "mechanism: overlapping arrays in the pipeline");
    check(n_pipe_full > 0, "mechanism: full stage memory");
    check(n_pipe_rows == K * D, "pipe: all rows out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
