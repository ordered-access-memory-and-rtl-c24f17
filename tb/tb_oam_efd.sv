// tb_oam_efd: self-checking test of the entering-fetching device.
//
// The memory array is replaced by location contents that the testbench
// drives itself, so the entering side (row pointer, clear, full) and the
// fetching side (index comparison and column steering) are checked apart
// from the store. Configuration: 2 inputs x 4 rows, 4 outputs, 8 locations.
module tb_oam_efd;
  localparam int IP = 2, IR = 4, OP = 4, P = IP * IR, DW = 16;
  localparam int RW = 1, CW = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic          wr_en = 0, rd_en = 0, rd_valid, full;
  logic [RW-1:0] wr_row [IP];
  logic [CW-1:0] wr_col [IP];
  logic [DW-1:0] wr_data[IP];
  logic [DW-1:0] rd_data[OP];
  logic          arr_clear, arr_we;
  logic [1:0]    arr_wr_row;
  logic [RW+CW-1:0] arr_wr_idx [IP];
  logic [DW-1:0]    arr_wr_data[IP];
  logic             loc_valid[P];
  logic [RW+CW-1:0] loc_idx [P];
  logic [DW-1:0]    loc_data[P];

  oam_efd #(.IN_PORTS(IP), .IN_ROWS(IR), .OUT_PORTS(OP), .DATA_W(DW)) dut (
    .clk, .rst, .wr_en, .wr_row, .wr_col, .wr_data, .rd_en, .rd_data, .rd_valid, .full,
    .arr_clear, .arr_we, .arr_wr_row, .arr_wr_idx, .arr_wr_data,
    .loc_valid, .loc_idx, .loc_data
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pos [P];

  initial begin
    for (int j = 0; j < IP; j++) begin wr_row[j] = 0; wr_col[j] = 0; wr_data[j] = 0; end
    // location contents: a fixed permutation, location 5 invalid
    for (int p = 0; p < P; p++) pos[p] = (p * 3 + 1) % P;
    for (int p = 0; p < P; p++) begin
      loc_valid[p] = (p != 5);
      loc_idx[p]   = (RW+CW)'(pos[p]);
      loc_data[p]  = DW'('h1000 + p);
    end
    repeat (2) @(negedge clk);
    rst = 0;

    // entering: rows go to location rows 0,1,2,3 in order, then full
    for (int i = 0; i < IR + 1; i++) begin
      wr_en = 1;
      for (int j = 0; j < IP; j++) begin
        wr_row[j] = RW'(j); wr_col[j] = CW'(i); wr_data[j] = DW'(i * 10 + j);
      end
      #1;
      check(arr_we == (i < IR), $sformatf("entering: we for row %0d", i));
      check(!arr_clear, "entering: no clear while writing");
      if (i < IR) begin
        check(int'(arr_wr_row) == i, $sformatf("entering: location row %0d", i));
        for (int j = 0; j < IP; j++) begin
          check(arr_wr_idx[j] == {RW'(j), CW'(i)}, "entering: index packed as {row,col}");
          check(arr_wr_data[j] == DW'(i * 10 + j), "entering: data passed");
        end
      end
      check(full == (i >= IR), $sformatf("entering: full flag before row %0d", i));
      @(negedge clk);
    end
    wr_en = 0;

    // fetching: two output rows, then wrap to row 0
    for (int s = 0; s < 3; s++) begin
      rd_en = 1;
      @(posedge clk); #1;
      check(rd_valid, "fetch: rd_valid");
      for (int t = 0; t < OP; t++) begin
        int exp_v;
        exp_v = 0;
        for (int p = 0; p < P; p++) if (loc_valid[p] && pos[p] == (s % 2) * OP + t) exp_v = 'h1000 + p;
        check(int'(rd_data[t]) == exp_v, $sformatf("fetch: row %0d col %0d = %h exp %h", s, t, rd_data[t], exp_v));
      end
      @(negedge clk);
    end
    rd_en = 0;
    @(posedge clk); #1;
    check(!rd_valid, "fetch: rd_valid drops");

    // the first write after reads starts a new array
    @(negedge clk);
    wr_en = 1;
    #1;
    check(arr_clear && arr_we && arr_wr_row == 0, "new array: clear, write at row 0");
    @(negedge clk);
    check(!arr_clear && arr_wr_row == 1 && !full, "new array: next row 1, not full");
    wr_en = 0;
    // fetching restarts at output row 0
    rd_en = 1;
    @(posedge clk); #1;
    for (int t = 0; t < OP; t++) begin
      int exp_v;
      exp_v = 0;
      for (int p = 0; p < P; p++) if (loc_valid[p] && pos[p] == t) exp_v = 'h1000 + p;
      check(int'(rd_data[t]) == exp_v, "new array: fetch restarts at row 0");
    end
    @(negedge clk); rd_en = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
