// comparand_reg: the Comparand Register of the TCAM.
//
// A Compare first loads its ternary comparand here; the register then
// drives the search lines of every word in parallel. Each bit is a pair
// (care, value): care = 0 is the X comparand bit, which drives neither
// search line. Reset loads an all-X comparand.
//
// The register and its role follow the usual CAM organisation; the
// care/value encoding and the reset value are this design's choices.
//
// Timing: loads at the rising clock edge when load = 1; the outputs hold
// the comparand until the next load.
module comparand_reg #(
  parameter int B = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [B-1:0] care_in,
  input  logic [B-1:0] val_in,
  output logic [B-1:0] c_care,
  output logic [B-1:0] c_val
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_care <= '0;
      c_val  <= '0;
    end else if (load) begin
      c_care <= care_in;
      c_val  <= val_in & care_in;
    end
  end

endmodule
