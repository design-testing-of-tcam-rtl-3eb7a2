// addr_decoder: word address decoder of the TCAM.
//
// Turns a binary word address into a one-hot word select, as the row
// decoder of a RAM does. With en = 0, or an address of N or more, no word
// is selected. Purely combinational. That the decoder works as in a RAM
// comes from the CAM organisation this design follows; the enable and the
// out-of-range behaviour are this design's choices.
module addr_decoder
  import tcam_pkg::*;
#(
  parameter int N = 3
) (
  input  logic                      en,
  input  logic [addr_width(N)-1:0]  addr,
  output logic [N-1:0]              sel
);

  always_comb begin
    sel = '0;
    for (int i = 0; i < N; i++)
      sel[i] = en && (int'(addr) == i);
  end

endmodule
