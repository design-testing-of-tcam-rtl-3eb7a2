// tcam_pkg: types and constants shared by the TCAM and its T_H test controller.
//
// - tcam_op_e: the operations a TCAM port accepts in one cycle (Write, Read,
//   Compare, or nothing).
// - cell_fault_e: the comparison faults an asymmetric TCAM cell can carry.
//   The ten BCAM comparison faults (SMF ... IM0F) and the m4 stuck-on fault
//   are the fault list of the T_H analysis; m4 stuck open behaves as a
//   stuck-at match and is listed for completeness; F_NONE is fault free.
// - th_elem_e: the six test elements TE1..TE6 of the T_H march-like test.
// - NUM_E: number of compare classes E0..E4 in the T_H fault dictionary.
// - addr_width(): address width for an N-word array (at least one bit).
package tcam_pkg;

  typedef enum logic [1:0] {
    OP_NOP     = 2'd0,
    OP_WRITE   = 2'd1,
    OP_READ    = 2'd2,
    OP_COMPARE = 2'd3
  } tcam_op_e;

  typedef enum logic [3:0] {
    F_NONE   = 4'd0,   // fault free
    F_SMF    = 4'd1,   // stuck-at match
    F_SMMF   = 4'd2,   // stuck-at mismatch
    F_PM1F   = 4'd3,   // matches only while the BCAM bit holds 1
    F_PM0F   = 4'd4,   // matches only while the BCAM bit holds 0
    F_CM1F   = 4'd5,   // matches only a comparand bit of 1
    F_CM0F   = 4'd6,   // matches only a comparand bit of 0
    F_EMM1F  = 4'd7,   // (1,1) gives a false mismatch
    F_EMM0F  = 4'd8,   // (0,0) gives a false mismatch
    F_IM1F   = 4'd9,   // stored 1 / compared 0 gives a false match
    F_IM0F   = 4'd10,  // stored 0 / compared 1 gives a false match
    F_M4_SON = 4'd11,  // mask transistor m4 stuck on
    F_M4_SOP = 4'd12   // mask transistor m4 stuck open (acts as SMF)
  } cell_fault_e;

  typedef enum logic [2:0] {
    TE_IDLE = 3'd0,
    TE1     = 3'd1,
    TE2     = 3'd2,
    TE3     = 3'd3,
    TE4     = 3'd4,
    TE5     = 3'd5,
    TE6     = 3'd6,
    TE_DONE = 3'd7
  } th_elem_e;

  localparam int NUM_E = 5;

  // Clock edges from a Compare request to its registered Hit response.
  localparam int CMP_LATENCY = 2;

  function automatic int addr_width(int n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
