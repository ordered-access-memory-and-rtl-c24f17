// tb_oam_memory_array: self-checking test of the OAM location store.
//
// Writes rows of (index, data) pairs into a 3-port, 4-row array in scrambled
// row order and checks every location against a reference copy, then checks
// that clear drops all valid bits while a write in the same cycle still
// lands, and that reset clears the valid bits.
module tb_oam_memory_array;
  localparam int IP = 3, IR = 4, P = IP * IR, IW = 5, DW = 12;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic           clear = 0, we = 0;
  logic [1:0]     wr_row = 0;
  logic [IW-1:0]  wr_idx [IP];
  logic [DW-1:0]  wr_data[IP];
  logic           loc_valid[P];
  logic [IW-1:0]  loc_idx [P];
  logic [DW-1:0]  loc_data[P];

  oam_memory_array #(.IN_PORTS(IP), .IN_ROWS(IR), .IDX_W(IW), .DATA_W(DW)) dut (
    .clk, .rst, .clear, .we, .wr_row, .wr_idx, .wr_data, .loc_valid, .loc_idx, .loc_data
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

  bit            ref_v [P];
  logic [IW-1:0] ref_i [P];
  logic [DW-1:0] ref_d [P];
  int order [IR] = '{2, 0, 3, 1};

  task automatic compare(input string tag);
    for (int p = 0; p < P; p++) begin
      check(loc_valid[p] == ref_v[p], $sformatf("%s: valid[%0d]", tag, p));
      if (ref_v[p]) begin
        check(loc_idx[p] == ref_i[p], $sformatf("%s: idx[%0d]", tag, p));
        check(loc_data[p] == ref_d[p], $sformatf("%s: data[%0d]", tag, p));
      end
    end
  endtask

  initial begin
    for (int j = 0; j < IP; j++) begin wr_idx[j] = 0; wr_data[j] = 0; end
    for (int p = 0; p < P; p++) ref_v[p] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    compare("after reset");
    for (int i = 0; i < IR; i++) begin
      we = 1; wr_row = 2'(order[i]);
      for (int j = 0; j < IP; j++) begin
        wr_idx[j]  = IW'($urandom);
        wr_data[j] = DW'($urandom);
        ref_v[order[i]*IP+j] = 1;
        ref_i[order[i]*IP+j] = wr_idx[j];
        ref_d[order[i]*IP+j] = wr_data[j];
      end
      @(negedge clk);
      we = 0;
      compare($sformatf("after row %0d", order[i]));
    end
    // clear with a simultaneous write of row 1
    clear = 1; we = 1; wr_row = 2'd1;
    for (int p = 0; p < P; p++) ref_v[p] = 0;
    for (int j = 0; j < IP; j++) begin
      wr_idx[j] = IW'(j); wr_data[j] = DW'(100 + j);
      ref_v[IP+j] = 1; ref_i[IP+j] = wr_idx[j]; ref_d[IP+j] = wr_data[j];
    end
    @(negedge clk);
    clear = 0; we = 0;
    compare("clear plus write");
    rst = 1;
    #1;
    for (int p = 0; p < P; p++) ref_v[p] = 0;
    compare("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
