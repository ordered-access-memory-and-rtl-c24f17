// tb_oam_ip: self-checking test of the OAM IP core pinout behaviour.
//
// Reduced depth (16 rows, 8 channels, 32 bits). Checks: write with
// in_en=1/rw=1, read with in_en=1/rw=0, nothing happens with in_en=0,
// out_en one clock after each read and one output row per clock (8 items per
// clock), ordering of a random permutation of 128 items, and that a rising
// edge on set empties the memory without a clock edge.
module tb_oam_ip;
  localparam int CH = 8, D = 16, N = CH * D;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        in_en = 0, rw = 0, set = 0, out_en;
  logic [2:0]  in_col [CH];
  logic [3:0]  in_row [CH];
  logic [31:0] io_data_in [CH];
  logic [31:0] io_data_out[CH];

  oam_ip #(.CHANNELS(CH), .DEPTH(D), .DATA_W(32)) dut (
    .clk, .in_en, .rw, .set, .in_col, .in_row, .io_data_in, .io_data_out, .out_en
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int perm [N];
  logic [31:0] val [N];
  int outs, first_out, last_out;

  always @(posedge clk) begin
    if (out_en) begin
      if (outs == 0) first_out = int'($time);
      last_out = int'($time);
      outs++;
    end
  end

  initial begin
    outs = 0;
    for (int j = 0; j < CH; j++) begin in_col[j] = 0; in_row[j] = 0; io_data_in[j] = 0; end
    @(negedge clk); set = 1;
    @(negedge clk); set = 0;
    for (int p = 0; p < N; p++) perm[p] = p;
    for (int p = N - 1; p > 0; p--) begin
      int q, tmp;
      q = $urandom_range(p, 0);
      tmp = perm[p]; perm[p] = perm[q]; perm[q] = tmp;
    end
    for (int p = 0; p < N; p++) val[p] = $urandom;

    // write D rows, with an idle (in_en=0) cycle in the middle
    for (int i = 0; i < D; i++) begin
      if (i == D / 2) begin
        in_en = 0; rw = 1;
        for (int j = 0; j < CH; j++) io_data_in[j] = 32'hdead_beef;
        @(negedge clk);
      end
      in_en = 1; rw = 1;
      for (int j = 0; j < CH; j++) begin
        in_row[j] = 4'(perm[i*CH+j] / CH);
        in_col[j] = 3'(perm[i*CH+j] % CH);
        io_data_in[j] = val[i*CH+j];
      end
      @(negedge clk);
    end
    in_en = 0;
    @(negedge clk);
    check(outs == 0, "no out_en while writing");

    // read D rows back to back
    in_en = 1; rw = 0;
    for (int s = 0; s < D; s++) begin
      @(posedge clk); #1;
      check(out_en, "out_en one clock after read");
      for (int t = 0; t < CH; t++) begin
        logic [31:0] e;
        e = 0;
        for (int p = 0; p < N; p++) if (perm[p] == s * CH + t) e = val[p];
        check(io_data_out[t] == e, $sformatf("OD[%0d][%0d]=%h exp %h", s, t, io_data_out[t], e));
      end
    end
    @(negedge clk); in_en = 0;
    @(posedge clk); #1;
    check(!out_en, "out_en low without read");
    check(outs == D, "one output row per read");
    check(last_out - first_out == (D - 1) * 10, "one output row per clock");

    // asynchronous reset on the rising edge of set, then read: memory empty
    @(negedge clk); #2; set = 1; #1;
    check(!out_en, "set clears out_en at once");
    @(negedge clk); set = 0;
    in_en = 1; rw = 0;
    @(posedge clk); #1;
    for (int t = 0; t < CH; t++) check(io_data_out[t] == 0, "empty after set");
    @(negedge clk); in_en = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
