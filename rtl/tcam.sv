// tcam: an N x B ternary CAM built from asymmetric cells.
//
// Organisation: an address decoder and a Data I/O read path as in a RAM,
// an array of N words (B cells plus a Valid bit each), a Comparand
// Register, a Hit Signal Generator and a priority address encoder. One
// operation is accepted per clock cycle on (op, addr, wdata, wcare):
//   OP_WRITE   writes the ternary pattern into word addr and sets its Valid
//              bit; wcare[b] = 0 writes X into bit b.
//   OP_READ    reads word addr: rdata/rcare valid one cycle later (rvalid).
//   OP_COMPARE loads (wdata, wcare) into the Comparand Register; in the
//              next cycle all words compare in parallel and Hit and the
//              priority address are registered, so hit_valid, hit,
//              pae_found and pae_addr appear two cycles after the request.
//              A Write issued right after a Compare does not disturb it.
// Compares see every Write issued in an earlier cycle.
//
// Fault injection (fi_*) gives one cell, word fi_word bit fi_bit, one of
// the comparison-fault models of tcam_cell; it exists to exercise the T_H
// test and is inert with fi_en = 0. The lowest-address priority and the
// cycle timing are this design's own choices.
module tcam
  import tcam_pkg::*;
#(
  parameter int N = 3,
  parameter int B = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // operation port
  input  tcam_op_e                  op,
  input  logic [addr_width(N)-1:0]  addr,
  input  logic [B-1:0]              wdata,
  input  logic [B-1:0]              wcare,
  // compare results
  output logic                      hit_valid,
  output logic                      hit,
  output logic                      pae_found,
  output logic [addr_width(N)-1:0]  pae_addr,
  // read results
  output logic                      rvalid,
  output logic [B-1:0]              rdata,
  output logic [B-1:0]              rcare,
  // fault injection
  input  logic                      fi_en,
  input  logic [addr_width(N)-1:0]  fi_word,
  input  logic [addr_width(B)-1:0]  fi_bit,
  input  cell_fault_e               fi_kind
);

  localparam int AW = addr_width(N);

  logic [N-1:0]        wsel, rsel, ml;
  logic [N-1:0][B-1:0] word_data, word_care;
  logic [B-1:0]        c_care, c_val;
  logic                cmp_q;
  logic                hit_c, found_c;
  logic [AW-1:0]       paddr_c;

  addr_decoder #(.N(N)) u_wdec (.en(op == OP_WRITE), .addr(addr), .sel(wsel));
  addr_decoder #(.N(N)) u_rdec (.en(op == OP_READ),  .addr(addr), .sel(rsel));

  comparand_reg #(.B(B)) u_creg (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (op == OP_COMPARE),
    .care_in(wcare),
    .val_in (wdata),
    .c_care (c_care),
    .c_val  (c_val)
  );

  for (genvar w = 0; w < N; w++) begin : g_word
    tcam_word #(.B(B)) u_word (
      .clk    (clk),
      .rst_n  (rst_n),
      .we     (wsel[w]),
      .wdata  (wdata),
      .wcare  (wcare),
      .c_care (c_care),
      .c_val  (c_val),
      .fi_en  (fi_en && (int'(fi_word) == w)),
      .fi_bit (fi_bit),
      .fi_kind(fi_kind),
      .valid  (),
      .ml     (ml[w]),
      .rd_data(word_data[w]),
      .rd_care(word_care[w])
    );
  end

  hit_sig_gen   #(.N(N)) u_hsg (.ml(ml), .hit(hit_c));
  prio_addr_enc #(.N(N)) u_pae (.ml(ml), .found(found_c), .addr(paddr_c));

  data_io #(.N(N), .B(B)) u_dio (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (op == OP_READ),
    .sel      (rsel),
    .word_data(word_data),
    .word_care(word_care),
    .rdata    (rdata),
    .rcare    (rcare),
    .rvalid   (rvalid)
  );

  // Evaluation stage: the comparand loaded in the previous cycle is matched
  // against the array and the results are registered.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_q     <= 1'b0;
      hit_valid <= 1'b0;
      hit       <= 1'b0;
      pae_found <= 1'b0;
      pae_addr  <= '0;
    end else begin
      cmp_q     <= (op == OP_COMPARE);
      hit_valid <= cmp_q;
      if (cmp_q) begin
        hit       <= hit_c;
        pae_found <= found_c;
        pae_addr  <= paddr_c;
      end
    end
  end

  // Reads and Writes must address an existing word.
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
    (op == OP_WRITE || op == OP_READ) |-> (int'(addr) < N));

endmodule
