// tcam_word: one word of the TCAM, B asymmetric cells and a Valid bit.
//
// The cells' match outputs are ANDed, as the shared match line of the word
// is discharged by any mismatching cell; the result is gated by the Valid
// bit, so an invalid word never reports a match. A Write stores the ternary
// pattern (wdata/wcare) into all B cells and sets Valid. Reset clears Valid
// only; cell contents are not reset, like an SRAM array.
//
// The Valid bit and its gating of the match signal follow the usual CAM
// organisation; reset behaviour and fault injection are this design's own.
//
// Fault injection: when fi_en is set, cell fi_bit of this word takes the
// defect model fi_kind; all other cells are fault free.
//
// Timing: cells and Valid are written at the rising clock edge; ml, rd_data
// and rd_care are combinational.
module tcam_word
  import tcam_pkg::*;
#(
  parameter int B = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [B-1:0]              wdata,
  input  logic [B-1:0]              wcare,
  input  logic [B-1:0]              c_care,
  input  logic [B-1:0]              c_val,
  input  logic                      fi_en,
  input  logic [addr_width(B)-1:0]  fi_bit,
  input  cell_fault_e               fi_kind,
  output logic                      valid,
  output logic                      ml,       // valid match of this word
  output logic [B-1:0]              rd_data,  // stored BCAM bits
  output logic [B-1:0]              rd_care   // stored mask bits
);

  logic [B-1:0] cell_match;

  for (genvar b = 0; b < B; b++) begin : g_cell
    cell_fault_e f;
    assign f = (fi_en && (int'(fi_bit) == b)) ? fi_kind : F_NONE;

    tcam_cell u_cell (
      .clk   (clk),
      .we    (we),
      .wdata (wdata[b]),
      .wcare (wcare[b]),
      .c_care(c_care[b]),
      .c_val (c_val[b]),
      .fault (f),
      .q_u   (rd_data[b]),
      .q_l   (rd_care[b]),
      .match (cell_match[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  valid <= 1'b0;
    else if (we) valid <= 1'b1;
  end

  assign ml = valid & (&cell_match);

endmodule
