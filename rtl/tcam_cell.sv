// tcam_cell: one asymmetric TCAM cell.
//
// The cell holds a BCAM bit Q_U and a mask bit Q_L. The ternary value is
// (Q_U,Q_L) = (0,1) -> 0, (1,1) -> 1, and Q_L = 0 -> X. Writing X forces
// Q_U to 0, so a masked cell always holds (0,0). In a Compare the comparand
// bit is either a care bit (0 or 1, one search line driven) or X (neither
// search line driven, so this cell cannot pull the match line down).
// A cell with Q_L = 1 behaves as a BCAM cell; with Q_L = 0 the mask
// transistor m4 is off and the cell always matches.
//
// fault selects a defect model for this cell. The ten BCAM comparison
// faults follow the compare-after-write response table of the T_H
// analysis (which of (w0,c0), (w0,c1), (w1,c0), (w1,c1) match). They act
// only while the cell is unmasked, except PM1F, which is modelled as a
// defect in the Q_U=0 discharge path that the mask does not isolate: that
// is this design's reading, chosen so that PM1F also shows in the (wX,c0)
// compare as the fault dictionary lists. The m4 stuck-on fault acts only
// while the cell is masked: a c0 comparand turns on m3 and the stuck-on m4
// completes the discharge path, giving a mismatch. With m4 stuck open the
// cell can never discharge the match line, so it always matches (the same
// response as SMF).
//
// Timing: Q_U/Q_L are written at the rising clock edge when we=1; match is
// combinational from the stored bits and the comparand bits.
module tcam_cell
  import tcam_pkg::*;
(
  input  logic        clk,
  input  logic        we,        // write this cell
  input  logic        wdata,     // value to write (ignored when wcare = 0)
  input  logic        wcare,     // 1: write 0/1, 0: write X
  input  logic        c_care,    // comparand bit is 0/1 (1) or X (0)
  input  logic        c_val,     // comparand bit value
  input  cell_fault_e fault,     // defect model of this cell
  output logic        q_u,       // stored BCAM bit
  output logic        q_l,       // stored mask bit (1 = care)
  output logic        match      // 1: this cell does not discharge the match line
);

  always_ff @(posedge clk) begin
    if (we) begin
      q_u <= wdata & wcare;
      q_l <= wcare;
    end
  end

  // Response of the BCAM part for a care comparand bit.
  logic bcam_match;
  always_comb begin
    unique case (fault)
      F_SMF:   bcam_match = 1'b1;
      F_SMMF:  bcam_match = 1'b0;
      F_PM1F:  bcam_match = q_u;
      F_PM0F:  bcam_match = ~q_u;
      F_CM1F:  bcam_match = c_val;
      F_CM0F:  bcam_match = ~c_val;
      F_EMM1F: bcam_match = ~q_u & ~c_val;
      F_EMM0F: bcam_match = q_u & c_val;
      F_IM1F:  bcam_match = (q_u == c_val) | (q_u & ~c_val);
      F_IM0F:  bcam_match = (q_u == c_val) | (~q_u & c_val);
      default: bcam_match = (q_u == c_val);   // F_NONE, F_M4_SON
    endcase
  end

  always_comb begin
    if (!c_care || fault == F_M4_SOP)
      match = 1'b1;                 // no search line driven, or m4 open
    else if (q_l)
      match = bcam_match;           // unmasked: BCAM compare
    else if (fault == F_M4_SON)
      match = c_val;                // c0 discharges through m3 and stuck-on m4
    else if (fault == F_PM1F)
      match = q_u;                  // defect not isolated by the mask
    else
      match = 1'b1;                 // masked: m4 off
  end

endmodule
