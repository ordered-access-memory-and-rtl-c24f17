// oam_pkg: types and constants shared by the ordered access memory (OAM) and
// the two OAM-based application-specific processors.
//
// An OAM location holds a data item together with the index that says where
// the item belongs in the output matrix. The index is a (row, column) pair of
// the output matrix; it travels with the data and is never an address. The
// operation codes of the lane ALU and the instruction set of the parallel
// processor's control unit are this design's own choice: the operations of
// the processors are left open by the architecture they implement.
package oam_pkg;

  // Operation applied by the parallel ALU / operating unit to all lanes.
  //   ALU_PASS : y[i] = a[i]
  //   ALU_BFLY : y[2j] = a[2j] + a[2j+1], y[2j+1] = a[2j] - a[2j+1]
  //   ALU_NEG  : y[i] = -a[i]
  //   ALU_SHR  : y[i] = a[i] >>> 1 (arithmetic)
  typedef enum logic [1:0] {
    ALU_PASS = 2'd0,
    ALU_BFLY = 2'd1,
    ALU_NEG  = 2'd2,
    ALU_SHR  = 2'd3
  } alu_op_e;

  // Control-unit operations of the parallel processor.
  //   CU_NOP   : no operation
  //   CU_LOAD  : write one row from the input ports into bank `bank`
  //   CU_PASS  : read the next row of bank `bank`, pass it through the ALU,
  //              write the result row into the other bank
  //   CU_STORE : read the next row of bank `bank` to the output ports
  //   CU_HALT  : stop and raise done
  typedef enum logic [2:0] {
    CU_NOP   = 3'd0,
    CU_LOAD  = 3'd1,
    CU_PASS  = 3'd2,
    CU_STORE = 3'd3,
    CU_HALT  = 3'd4
  } cu_op_e;

  // One control-unit instruction; the per-lane indices that go with a LOAD
  // or PASS are held in a parallel index memory of the control unit.
  typedef struct packed {
    cu_op_e  op;
    alu_op_e alu;
    logic    bank;
  } cu_instr_t;

  // Width of a counter or index able to take N distinct values (at least 1).
  function automatic int idx_width(input int n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
