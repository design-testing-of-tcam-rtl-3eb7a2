// data_io: Data I/O of the TCAM, the read path.
//
// On a Read the word selected by the address decoder is driven out: its
// BCAM bits (rdata) and mask bits (rcare), so a stored X reads back as
// rcare = 0, rdata = 0. The outputs are registered, and rvalid marks the
// cycle they belong to. (The write path is the word-wide write data bus
// that the decoder's select enables in each word.)
//
// A RAM-like Data I/O is part of the usual CAM organisation; the output
// register and its timing are this design's choices.
//
// Timing: a Read presented in cycle t is answered in cycle t+1.
module data_io #(
  parameter int N = 3,
  parameter int B = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rd_en,
  input  logic [N-1:0]        sel,       // one-hot word select
  input  logic [N-1:0][B-1:0] word_data,
  input  logic [N-1:0][B-1:0] word_care,
  output logic [B-1:0]        rdata,
  output logic [B-1:0]        rcare,
  output logic                rvalid
);

  logic [B-1:0] mux_data, mux_care;

  always_comb begin
    mux_data = '0;
    mux_care = '0;
    for (int i = 0; i < N; i++) begin
      if (sel[i]) begin
        mux_data |= word_data[i];
        mux_care |= word_care[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= '0;
      rcare  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd_en;
      if (rd_en) begin
        rdata <= mux_data;
        rcare <= mux_care;
      end
    end
  end

endmodule
