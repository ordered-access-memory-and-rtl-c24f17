// tb_asp_pipeline: self-checking test of the pipeline-structure processor.
//
// 3 stages, 8 lanes, 2 rows per OAM, 32-bit data. The testbench acts as the
// control device: array k enters OAM 0 at cycle 4k, and each stage writes for
// 2 cycles and then reads for 2 cycles, the next stage writing what it reads
// one cycle later, so up to three arrays are in flight at once.
// Array 0 is an 8-point Walsh-Hadamard transform of each row: OAM 0 keeps the
// order, OAM 1 and OAM 2 apply the perfect-shuffle reordering and every OU
// runs the butterfly; the result is compared with the Hadamard matrix
// product. Arrays 1..5 use random ordering codes and operation codes and are
// compared with a reference model. Also checked: od_valid one cycle after a
// read of the last stage and one row per clock.
module tb_asp_pipeline;
  import oam_pkg::*;
  localparam int S = 3, L = 8, R = 2, DW = 32, N = L * R, K = 6, PER = 2 * R;
  localparam int RW = 1, CW = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [DW-1:0] id [L];
  logic          r [S], w [S];
  logic [RW-1:0] oc_row [S][L];
  logic [CW-1:0] oc_col [S][L];
  alu_op_e       opc [S];
  logic [DW-1:0] od [L];
  logic          od_valid;
  logic          full [S];

  asp_pipeline #(.STAGES(S), .LANES(L), .ROWS(R), .DATA_W(DW)) dut (
    .clk, .rst, .id, .r, .w, .oc_row, .oc_col, .opc, .od, .od_valid, .full
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

  // stimulus and reference
  int            code [K][S][N];     // output position of input item n
  int            ops  [K][S];
  logic [DW-1:0] src  [K][R][L];
  logic [DW-1:0] expected [K][R][L];

  function automatic logic [DW-1:0] ref_alu(input int op, input logic [DW-1:0] a [L], input int i);
    case (op)
      0: return a[i];
      1: return (i % 2 == 0) ? a[i] + a[i+1] : a[i-1] - a[i];
      2: return -a[i];
      default: return {a[i][DW-1], a[i][DW-1:1]};
    endcase
  endfunction

  initial begin
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < R; i++) for (int j = 0; j < L; j++)
        src[k][i][j] = (k == 0) ? DW'($urandom_range(2000, 0)) - 1000 : $urandom;
      for (int s = 0; s < S; s++) begin
        if (k == 0) begin
          ops[k][s] = 1;
          for (int n = 0; n < N; n++)
            code[k][s][n] = (s == 0) ? n : (n / L) * L + ((n % 2 == 0) ? (n % L) / 2 : L / 2 + (n % L) / 2);
        end else begin
          ops[k][s] = $urandom_range(3, 0);
          for (int n = 0; n < N; n++) code[k][s][n] = n;
          for (int n = N - 1; n > 0; n--) begin
            int q, t;
            q = $urandom_range(n, 0);
            t = code[k][s][n]; code[k][s][n] = code[k][s][q]; code[k][s][q] = t;
          end
        end
      end
    end
    // reference model of the stage chain
    for (int k = 0; k < K; k++) begin
      logic [DW-1:0] cur [R][L];
      logic [DW-1:0] mem [N];
      logic [DW-1:0] row [L];
      cur = src[k];
      for (int s = 0; s < S; s++) begin
        for (int i = 0; i < R; i++) for (int j = 0; j < L; j++) mem[code[k][s][i*L+j]] = cur[i][j];
        for (int i = 0; i < R; i++) begin
          for (int j = 0; j < L; j++) row[j] = mem[i*L+j];
          for (int j = 0; j < L; j++) cur[i][j] = ref_alu(ops[k][s], row, j);
        end
      end
      expected[k] = cur;
    end
    // array 0 against the Hadamard matrix: lane 2j holds H row j, lane 2j+1 row j+4
    for (int i = 0; i < R; i++) begin
      for (int u = 0; u < L; u++) begin
        int acc, lane;
        acc = 0;
        for (int v = 0; v < L; v++) acc += ($countones(u & v) % 2 == 0) ? int'(src[0][i][v]) : -int'(src[0][i][v]);
        lane = (u < L / 2) ? 2 * u : 2 * (u - L / 2) + 1;
        check(int'(expected[0][i][lane]) == acc, "reference model agrees with the Hadamard transform");
      end
    end
  end

  // control device: global schedule
  int cyc;
  always_comb begin
    for (int j = 0; j < L; j++) id[j] = '0;
    for (int s = 0; s < S; s++) begin
      r[s] = 0; w[s] = 0; opc[s] = ALU_PASS;
      for (int j = 0; j < L; j++) begin oc_row[s][j] = '0; oc_col[s][j] = '0; end
    end
    for (int k = 0; k < K; k++) begin
      for (int s = 0; s < S; s++) begin
        int ws, rs;
        ws = k * PER + s * (R + 1);
        rs = ws + R;
        if (cyc >= ws && cyc < ws + R) begin
          w[s] = 1;
          for (int j = 0; j < L; j++) begin
            oc_row[s][j] = RW'(code[k][s][(cyc - ws) * L + j] / L);
            oc_col[s][j] = CW'(code[k][s][(cyc - ws) * L + j] % L);
            if (s == 0) id[j] = src[k][cyc - ws][j];
          end
        end
        if (cyc >= rs && cyc < rs + R) r[s] = 1;
        if (cyc > rs && cyc <= rs + R) opc[s] = alu_op_e'(ops[k][s]);
      end
    end
  end

  int n_rows, last_r, last_valid;
  logic r_last_q;
  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0; n_rows <= 0; r_last_q <= 0;
    end else begin
      cyc <= cyc + 1;
      r_last_q <= r[S-1];
      if (cyc == R) check(full[0], "OAM 0 full once its capacity is written");
      if (cyc == R + 1) check(full[0], "OAM 0 stays full while read");
      check(od_valid == r_last_q, $sformatf("cycle %0d: od_valid one cycle after last-stage read", cyc));
      if (od_valid) begin
        for (int j = 0; j < L; j++)
          check(od[j] == expected[n_rows / R][n_rows % R][j],
                $sformatf("array %0d row %0d lane %0d = %h exp %h", n_rows / R, n_rows % R, j,
                          od[j], expected[n_rows / R][n_rows % R][j]));
        n_rows <= n_rows + 1;
      end
    end
  end

  initial begin
    cyc = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    wait (n_rows == K * R);
    @(negedge clk);
    check(cyc == (K - 1) * PER + (S - 1) * (R + 1) + 2 * R + 1, $sformatf("finished at cycle %0d", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
