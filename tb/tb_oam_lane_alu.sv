// tb_oam_lane_alu: self-checking test of the lane ALU / operating unit.
// Random operands for every operation code, compared with a reference
// computed here in 32-bit signed arithmetic.
module tb_oam_lane_alu;
  import oam_pkg::*;
  localparam int L = 8;
  int checks = 0, failures = 0;
  alu_op_e     op;
  logic [31:0] a [L];
  logic [31:0] y [L];

  oam_lane_alu #(.LANES(L), .DATA_W(32)) dut (.op, .a, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      op = alu_op_e'(n % 4);
      for (int i = 0; i < L; i++) a[i] = (n < 8) ? 32'h8000_0000 >> n : $urandom;
      #1;
      for (int i = 0; i < L; i++) begin
        int e;
        case (n % 4)
          0: e = int'(a[i]);
          1: e = (i % 2 == 0) ? int'(a[i]) + int'(a[i+1]) : int'(a[i-1]) - int'(a[i]);
          2: e = 0 - int'(a[i]);
          default: e = int'(a[i]) / 2 - ((int'(a[i]) < 0 && int'(a[i]) % 2 != 0) ? 1 : 0);
        endcase
        checks++;
        if (int'(y[i]) != e) begin
          failures++;
          $display("FAIL: op %0d lane %0d a=%h y=%h exp %h", n % 4, i, a[i], y[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
