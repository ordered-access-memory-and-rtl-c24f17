// oam_lane_alu: parallel arithmetic-logic unit / operating unit.
//
// One operation code is applied across LANES data lanes in the same cycle.
// It serves both as the parallel ALU of the parallel-structure processor and
// as the operating unit (OU) of each stage of the pipeline-structure
// processor. The architecture leaves the operation to the algorithm the
// processor is built for; the small set here (pass, pairwise butterfly,
// negate, arithmetic halve; see oam_pkg::alu_op_e) is this design's own
// choice, picked so that together with the OAM's reordering it can run
// transforms such as a fast Walsh-Hadamard transform. The butterfly pairs lane
// 2j with lane 2j+1 and needs an even LANES.
//
// Purely combinational; arithmetic is two's complement and wraps at DATA_W
// bits.
module oam_lane_alu #(
  parameter int LANES  = 8,
  parameter int DATA_W = 32
) (
  input  oam_pkg::alu_op_e  op,
  input  logic [DATA_W-1:0] a [LANES],
  output logic [DATA_W-1:0] y [LANES]
);
  import oam_pkg::*;

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      unique case (op)
        ALU_PASS: y[i] = a[i];
        ALU_BFLY: y[i] = (i % 2 == 0) ? a[i] + a[i+1] : a[i-1] - a[i];
        ALU_NEG:  y[i] = -a[i];
        ALU_SHR:  y[i] = DATA_W'($signed(a[i]) >>> 1);
        default:  y[i] = a[i];
      endcase
    end
  end

endmodule
