// hit_sig_gen: Hit Signal Generator (HSG).
//
// Hit = M0 | M1 | ... | M(N-1): 1 when at least one word reports a valid
// match. The match lines arriving here are already gated by each word's
// Valid bit. Purely combinational; the TCAM registers the result. The
// function is the standard one for a Hit-output TCAM; nothing is added.
module hit_sig_gen #(
  parameter int N = 3
) (
  input  logic [N-1:0] ml,
  output logic         hit
);

  assign hit = |ml;

endmodule
