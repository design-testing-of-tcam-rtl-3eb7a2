// prio_addr_enc: priority address encoder (PAE).
//
// Exports the address of the highest-priority matching word. Priority goes
// to the lowest address, one of the two conventions in use (lowest or
// highest matched address); which of the two is this design's choice. found is 0 when no word matches, and addr is
// then 0. Purely combinational; the TCAM registers the result.
module prio_addr_enc
  import tcam_pkg::*;
#(
  parameter int N = 3
) (
  input  logic [N-1:0]              ml,
  output logic                      found,
  output logic [addr_width(N)-1:0]  addr
);

  localparam int AW = addr_width(N);

  always_comb begin
    found = 1'b0;
    addr  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (ml[i]) begin
        found = 1'b1;
        addr  = AW'(i);
      end
    end
  end

endmodule
