// tb_ref_pkg: reference data for the testbenches, written out from the
// comparison-fault analysis of the asymmetric TCAM cell.
//
// bcam_resp(): compare-after-write response of an unmasked cell, per fault,
// for (w0,c0), (w0,c1), (w1,c0), (w1,c1) (1 = match).
// fault_dict(): the T_H fault dictionary, which compare classes E0..E4
// fail for a single cell carrying the fault.
// ref_cell_match(): full ternary reference of one cell, including a stored
// X and an X comparand bit.
package tb_ref_pkg;
  import tcam_pkg::*;

  function automatic logic [0:3] bcam_resp(cell_fault_e f);
    case (f)
      F_SMF, F_M4_SOP: return 4'b1111;
      F_SMMF:  return 4'b0000;
      F_PM1F:  return 4'b0011;
      F_PM0F:  return 4'b1100;
      F_CM1F:  return 4'b0101;
      F_CM0F:  return 4'b1010;
      F_EMM1F: return 4'b1000;
      F_EMM0F: return 4'b0001;
      F_IM1F:  return 4'b1011;
      F_IM0F:  return 4'b1101;
      default: return 4'b1001;
    endcase
  endfunction

  // bit order E0..E4 left to right; returned with E0 in bit 0
  function automatic logic [4:0] fault_dict(cell_fault_e f);
    logic [0:4] r;
    case (f)
      F_SMF, F_M4_SOP: r = 5'b00101;
      F_SMMF:   r = 5'b01010;
      F_CM1F:   r = 5'b01001;
      F_CM0F:   r = 5'b00110;
      F_PM1F:   r = 5'b11100;
      F_PM0F:   r = 5'b00011;
      F_EMM1F:  r = 5'b00010;
      F_EMM0F:  r = 5'b01000;
      F_IM1F:   r = 5'b00100;
      F_IM0F:   r = 5'b00001;
      F_M4_SON: r = 5'b10000;
      default:  r = 5'b00000;
    endcase
    for (int i = 0; i < 5; i++) fault_dict[i] = r[i];
  endfunction

  // stored: 0/1 with s_care=1, X with s_care=0; comparand likewise
  function automatic logic ref_cell_match(logic s_val, logic s_care,
                                          logic c_val, logic c_care,
                                          cell_fault_e f);
    logic [0:3] t;
    if (!c_care || f == F_M4_SOP) return 1'b1;
    if (s_care) begin
      t = bcam_resp(f);
      return t[{s_val, c_val}];
    end
    if (f == F_M4_SON) return c_val;
    if (f == F_PM1F)   return 1'b0;
    return 1'b1;
  endfunction

endpackage
