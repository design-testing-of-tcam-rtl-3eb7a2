// tcam_th_top: an N x B asymmetric-cell TCAM with Hit output and its T_H
// comparison-fault test controller.
//
// In normal mode (test_mode = 0) the operation port (op, addr, wdata,
// wcare) drives the TCAM directly. In test mode the T_H controller owns
// the TCAM port: pulse test_start and the controller runs TE1..TE6
// (7N Writes, 3N+2B Compares, one per cycle), then raises test_done with
// test_pass and the E0..E4 fault-dictionary syndrome;
// test_elem shows the test element being applied. The test overwrites
// the TCAM contents. hit/pae/read outputs are always visible, with the
// TCAM's timing (Read: 1 cycle, Compare: 2 cycles).
//
// In normal mode a pulse on enum_start (key held on enum_key/enum_care)
// starts match_enum, which reports every matching address in priority
// order on enum_found_valid/enum_found_addr and restores the array before
// enum_done; the normal port is ignored while enum_busy is high.
//
// fi_* inject one comparison fault into one cell to exercise the test;
// tie fi_en to 0 in use. Switching test_mode while a test runs is not
// supported; the mode multiplexer is this design's own addition.
module tcam_th_top
  import tcam_pkg::*;
#(
  parameter int N = 3,
  parameter int B = 3,
  parameter bit TH_DESCENDING = 1'b0   // T_H word loops in descending order
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // normal operation port
  input  tcam_op_e                  op,
  input  logic [addr_width(N)-1:0]  addr,
  input  logic [B-1:0]              wdata,
  input  logic [B-1:0]              wcare,
  output logic                      hit_valid,
  output logic                      hit,
  output logic                      pae_found,
  output logic [addr_width(N)-1:0]  pae_addr,
  output logic                      rvalid,
  output logic [B-1:0]              rdata,
  output logic [B-1:0]              rcare,
  // T_H test
  input  logic                      test_mode,
  input  logic                      test_start,
  output th_elem_e                  test_elem,
  output logic                      test_busy,
  output logic                      test_done,
  output logic                      test_pass,
  output logic [NUM_E-1:0]          test_syndrome,
  output logic [31:0]               test_fail_count,
  output logic [31:0]               test_writes,
  output logic [31:0]               test_compares,
  // readout of all matching addresses
  input  logic                      enum_start,
  input  logic [B-1:0]              enum_key,
  input  logic [B-1:0]              enum_care,
  output logic                      enum_busy,
  output logic                      enum_done,
  output logic                      enum_found_valid,
  output logic [addr_width(N)-1:0]  enum_found_addr,
  output logic [addr_width(N):0]    enum_found_count,
  // fault injection
  input  logic                      fi_en,
  input  logic [addr_width(N)-1:0]  fi_word,
  input  logic [addr_width(B)-1:0]  fi_bit,
  input  cell_fault_e               fi_kind
);

  localparam int AW = addr_width(N);

  tcam_op_e      b_op, e_op, t_op;
  logic [AW-1:0] b_addr, e_addr, t_addr;
  logic [B-1:0]  b_wdata, b_wcare, e_wdata, e_wcare, t_wdata, t_wcare;

  th_bist #(.N(N), .B(B), .DESCENDING(TH_DESCENDING)) u_bist (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (test_mode && test_start),
    .op        (b_op),
    .addr      (b_addr),
    .wdata     (b_wdata),
    .wcare     (b_wcare),
    .hit_valid (hit_valid),
    .hit       (hit),
    .elem      (test_elem),
    .busy      (test_busy),
    .done      (test_done),
    .pass      (test_pass),
    .syndrome  (test_syndrome),
    .fail_count(test_fail_count),
    .n_writes  (test_writes),
    .n_compares(test_compares)
  );

  match_enum #(.N(N), .B(B)) u_enum (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (!test_mode && enum_start),
    .key        (enum_key),
    .key_care   (enum_care),
    .op         (e_op),
    .addr       (e_addr),
    .wdata      (e_wdata),
    .wcare      (e_wcare),
    .hit_valid  (hit_valid),
    .pae_found  (pae_found),
    .pae_addr   (pae_addr),
    .rvalid     (rvalid),
    .rdata      (rdata),
    .rcare      (rcare),
    .busy       (enum_busy),
    .done       (enum_done),
    .found_valid(enum_found_valid),
    .found_addr (enum_found_addr),
    .found_count(enum_found_count)
  );

  always_comb begin
    if (test_mode) begin
      t_op = b_op; t_addr = b_addr; t_wdata = b_wdata; t_wcare = b_wcare;
    end else if (enum_busy) begin
      t_op = e_op; t_addr = e_addr; t_wdata = e_wdata; t_wcare = e_wcare;
    end else begin
      t_op = op;   t_addr = addr;   t_wdata = wdata;   t_wcare = wcare;
    end
  end

  tcam #(.N(N), .B(B)) u_tcam (
    .clk      (clk),
    .rst_n    (rst_n),
    .op       (t_op),
    .addr     (t_addr),
    .wdata    (t_wdata),
    .wcare    (t_wcare),
    .hit_valid(hit_valid),
    .hit      (hit),
    .pae_found(pae_found),
    .pae_addr (pae_addr),
    .rvalid   (rvalid),
    .rdata    (rdata),
    .rcare    (rcare),
    .fi_en    (fi_en),
    .fi_word  (fi_word),
    .fi_bit   (fi_bit),
    .fi_kind  (fi_kind)
  );

endmodule
