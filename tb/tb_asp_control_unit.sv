// tb_asp_control_unit: self-checking, cycle-exact test of the parallel
// processor's control unit on its own.
//
// Program: LOAD b0, LOAD b0 (input held back two cycles), PASS b0 BFLY,
// PASS b0 NEG, STORE b1 (must wait one cycle for the pending write into
// bank 1), HALT. Every cycle the memory strobes, the write source, the
// indices, the ALU code and the stall flags are compared with a hand-derived
// schedule.
module tb_asp_control_unit;
  import oam_pkg::*;
  localparam int L = 4, RW = 2, CW = 2, PD = 8, PCW = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic           prog_we = 0, start = 0, busy, done, in_valid = 0, in_ready;
  logic [PCW-1:0] prog_addr = 0;
  cu_instr_t      prog_instr;
  logic [RW-1:0]  prog_row [L];
  logic [CW-1:0]  prog_col [L];
  logic           wr_en [2], rd_en [2];
  logic           wr_from_alu, fetch_bank, fetch_to_out, hazard_stall, input_stall;
  logic [RW-1:0]  wr_row [L];
  logic [CW-1:0]  wr_col [L];
  alu_op_e        alu_op;

  asp_control_unit #(.LANES(L), .ROW_W(RW), .COL_W(CW), .PROG_DEPTH(PD)) dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_instr, .prog_row, .prog_col,
    .start, .busy, .done, .in_valid, .in_ready,
    .wr_en, .wr_from_alu, .wr_row, .wr_col, .rd_en, .fetch_bank, .fetch_to_out,
    .alu_op, .hazard_stall, .input_stall
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // index set k: row = (k + lane) % 4, col = (3 * lane + k) % 4
  task automatic load(input int addr, input cu_op_e op, input alu_op_e alu, input bit bank, input int k);
    @(negedge clk);
    prog_we = 1; prog_addr = PCW'(addr);
    prog_instr = '{op: op, alu: alu, bank: bank};
    for (int i = 0; i < L; i++) begin
      prog_row[i] = RW'((k + i) % 4);
      prog_col[i] = CW'((3 * i + k) % 4);
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  // expectation for one cycle
  task automatic expect_cycle(input int c, input bit w0, input bit w1, input bit from_alu,
                              input int k, input bit r0, input bit r1,
                              input bit hz, input bit is, input bit rdy);
    check(wr_en[0] == w0 && wr_en[1] == w1, $sformatf("c%0d: wr_en", c));
    check(rd_en[0] == r0 && rd_en[1] == r1, $sformatf("c%0d: rd_en", c));
    check(hazard_stall == hz, $sformatf("c%0d: hazard_stall", c));
    check(input_stall == is, $sformatf("c%0d: input_stall", c));
    check(in_ready == rdy, $sformatf("c%0d: in_ready", c));
    if (w0 || w1) begin
      check(wr_from_alu == from_alu, $sformatf("c%0d: write source", c));
      for (int i = 0; i < L; i++)
        check(int'(wr_row[i]) == (k + i) % 4 && int'(wr_col[i]) == (3 * i + k) % 4,
              $sformatf("c%0d: indices lane %0d", c, i));
    end
  endtask

  initial begin
    for (int i = 0; i < L; i++) begin prog_row[i] = 0; prog_col[i] = 0; end
    prog_instr = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    load(0, CU_LOAD,  ALU_PASS, 1'b0, 0);
    load(1, CU_LOAD,  ALU_PASS, 1'b0, 1);
    load(2, CU_PASS,  ALU_BFLY, 1'b0, 2);
    load(3, CU_PASS,  ALU_NEG,  1'b0, 3);
    load(4, CU_STORE, ALU_PASS, 1'b1, 0);
    load(5, CU_HALT,  ALU_PASS, 1'b0, 0);
    check(!busy && !done, "idle before start");
    start = 1;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    // c0: LOAD issues
    in_valid = 1; #1;
    expect_cycle(0, 1, 0, 0, 0, 0, 0, 0, 0, 1);
    @(negedge clk); in_valid = 0; #1;
    expect_cycle(1, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    @(negedge clk); #1;
    expect_cycle(2, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    @(negedge clk); in_valid = 1; #1;
    expect_cycle(3, 1, 0, 0, 1, 0, 0, 0, 0, 1);
    @(negedge clk); in_valid = 0; #1;
    expect_cycle(4, 0, 0, 0, 0, 1, 0, 0, 0, 0);
    @(negedge clk); #1;
    expect_cycle(5, 0, 1, 1, 2, 1, 0, 0, 0, 0);
    check(alu_op == ALU_BFLY && fetch_bank == 0, "c5: ALU code and fetched bank");
    @(negedge clk); #1;
    expect_cycle(6, 0, 1, 1, 3, 0, 0, 1, 0, 0);
    check(alu_op == ALU_NEG, "c6: ALU code");
    @(negedge clk); #1;
    expect_cycle(7, 0, 0, 0, 0, 0, 1, 0, 0, 0);
    @(negedge clk); #1;
    expect_cycle(8, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    check(fetch_to_out && fetch_bank == 1, "c8: stored row goes out from bank 1");
    check(busy, "c8: still busy");
    @(negedge clk); #1;
    check(done && !busy, "c9: done");
    @(negedge clk); #1;
    check(done && !rd_en[0] && !rd_en[1] && !wr_en[0] && !wr_en[1], "quiet after halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
