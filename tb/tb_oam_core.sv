// tb_oam_core: self-checking test of the ordered access memory core.
//
// Instance A is the 4-input, 6-output, 12-item example: a 3 x 4 input matrix
// with two-digit indices (row digit, column digit) is ordered into a 2 x 6
// output matrix in 3 write and 2 read operations. Instance B (4 inputs,
// 8 outputs, 16 items) takes random permutations over several arrays and
// checks: ordering against a reference model, the one-cycle read latency,
// one row per clock, the start of a new array after reads, a missing index
// reading as zero, and writes dropped when the array is full.
module tb_oam_core;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- A
  logic        a_wr_en = 0, a_rd_en = 0, a_rd_valid, a_full;
  logic [0:0]  a_wr_row [4];
  logic [2:0]  a_wr_col [4];
  logic [7:0]  a_wr_data[4];
  logic [7:0]  a_rd_data[6];

  oam_core #(.IN_PORTS(4), .IN_ROWS(3), .OUT_PORTS(6), .DATA_W(8)) u_a (
    .clk, .rst, .wr_en(a_wr_en), .wr_row(a_wr_row), .wr_col(a_wr_col),
    .wr_data(a_wr_data), .rd_en(a_rd_en), .rd_data(a_rd_data),
    .rd_valid(a_rd_valid), .full(a_full)
  );

  // ---------------------------------------------------------------- B
  localparam int BI = 4, BR = 4, BO = 8, BP = BI * BR;
  logic        b_wr_en = 0, b_rd_en = 0, b_rd_valid, b_full;
  logic [0:0]  b_wr_row [BI];
  logic [2:0]  b_wr_col [BI];
  logic [15:0] b_wr_data[BI];
  logic [15:0] b_rd_data[BO];

  oam_core #(.IN_PORTS(BI), .IN_ROWS(BR), .OUT_PORTS(BO), .DATA_W(16)) u_b (
    .clk, .rst, .wr_en(b_wr_en), .wr_row(b_wr_row), .wr_col(b_wr_col),
    .wr_data(b_wr_data), .rd_en(b_rd_en), .rd_data(b_rd_data),
    .rd_valid(b_rd_valid), .full(b_full)
  );

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int idm [3][4] = '{'{21, 7, 10, 14}, '{42, 6, 11, 12}, '{17, 4, 13, 25}};
  int im  [3][4] = '{'{2, 1, 4, 12}, '{13, 3, 15, 5}, '{0, 10, 11, 14}};
  int odm [2][6] = '{'{17, 7, 21, 6, 10, 12}, '{4, 13, 14, 42, 25, 11}};

  int perm [BP];
  int val  [BP];
  int ops;

  initial begin
    for (int j = 0; j < 4; j++) begin a_wr_row[j] = 0; a_wr_col[j] = 0; a_wr_data[j] = 0; end
    for (int j = 0; j < BI; j++) begin b_wr_row[j] = 0; b_wr_col[j] = 0; b_wr_data[j] = 0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // ---- A: the 12-item ordering example
    ops = 0;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      a_wr_en = 1;
      for (int j = 0; j < 4; j++) begin
        a_wr_row[j] = 1'(im[i][j] / 10);
        a_wr_col[j] = 3'(im[i][j] % 10);
        a_wr_data[j] = 8'(idm[i][j]);
      end
      ops++;
    end
    @(negedge clk); a_wr_en = 0;
    for (int s = 0; s < 2; s++) begin
      int c0;
      a_rd_en = 1; ops++;
      c0 = cycle;
      @(posedge clk); #1;
      check(a_rd_valid && cycle == c0 + 1, "A: row delivered one cycle after read");
      for (int t = 0; t < 6; t++)
        check(int'(a_rd_data[t]) == odm[s][t], $sformatf("A: OD[%0d][%0d]=%0d exp %0d", s, t, a_rd_data[t], odm[s][t]));
      @(negedge clk); a_rd_en = 0;
    end
    check(ops == 5, "A: 5 operations");
    @(posedge clk); #1;
    check(!a_rd_valid, "A: rd_valid drops without read");

    // ---- B: random permutations, rows back to back
    for (int arr = 0; arr < 6; arr++) begin
      int nrows;
      nrows = (arr == 3) ? BR - 1 : BR;   // array 3 leaves one row unwritten
      for (int p = 0; p < BP; p++) perm[p] = p;
      for (int p = BP - 1; p > 0; p--) begin
        int q, tmp;
        q = $urandom_range(p, 0);
        tmp = perm[p]; perm[p] = perm[q]; perm[q] = tmp;
      end
      for (int p = 0; p < BP; p++) val[p] = $urandom_range(32'hffff, 1);
      for (int i = 0; i < nrows; i++) begin
        @(negedge clk);
        b_wr_en = 1;
        for (int j = 0; j < BI; j++) begin
          b_wr_row[j]  = 1'(perm[i*BI+j] / BO);
          b_wr_col[j]  = 3'(perm[i*BI+j] % BO);
          b_wr_data[j] = 16'(val[i*BI+j]);
        end
      end
      if (arr == 5) begin
        // one write too many: must be dropped
        @(negedge clk);
        check(b_full, "B: full after capacity written");
        for (int j = 0; j < BI; j++) begin
          b_wr_row[j] = 1'(perm[j] / BO); b_wr_col[j] = 3'(perm[j] % BO); b_wr_data[j] = 16'h0bad;
        end
      end
      @(negedge clk);
      b_wr_en = 0;
      b_rd_en = 1;
      for (int s = 0; s < BP / BO; s++) begin
        @(posedge clk); #1;
        check(b_rd_valid, "B: rd_valid each cycle");
        for (int t = 0; t < BO; t++) begin
          int exp_v;
          exp_v = 0;
          for (int p = 0; p < nrows * BI; p++) if (perm[p] == s * BO + t) exp_v = val[p];
          check(int'(b_rd_data[t]) == exp_v,
                $sformatf("B: array %0d OD[%0d][%0d]=%h exp %h", arr, s, t, b_rd_data[t], exp_v));
        end
      end
      @(negedge clk); b_rd_en = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
