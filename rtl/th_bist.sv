// th_bist: controller that applies the T_H march-like test to a TCAM with
// a Hit output only, and checks every response.
//
// The test (N words of B bits; the word loops run in ascending address
// order, or descending with DESCENDING = 1, and the test is meant to work
// either way):
//   TE1  for each word: w1
//   TE2  for each word: wX, cP0, w0, cP0, w1      (both compares expect Hit=1)
//   TE3  for each column j: compare with 0 in column j, X elsewhere (Hit=0)
//   TE4  for each word: w0
//   TE5  for each word: w1, cP1, w0               (compare expects Hit=1)
//   TE6  for each column j: compare with 1 in column j, X elsewhere (Hit=0)
// That is 7N Writes and 3N+2B Compares, one operation per clock cycle.
// Each compare belongs to one class of the fault dictionary:
//   E0 = (wX,c0) and E1 = (w0,c0) in TE2, E2 = (w1,c0) in TE3,
//   E3 = (w1,c1) in TE5, E4 = (w0,c1) in TE6.
// A compare whose Hit differs from the fault-free value sets its class bit
// in syndrome and counts in fail_count; the syndrome identifies the fault
// type of a single faulty cell.
//
// The test elements, their expected responses and the E0..E4 classes are
// those of the T_H test; the one-operation-per-cycle sequencer, the
// pipelined response check and the counters are this design's own.
//
// Interface: pulse start (accepted when idle or done); the controller then
// drives op/addr/wdata/wcare of the TCAM every cycle and reads hit/hit_valid.
// Compare responses are expected CMP_LATENCY cycles after the request; an
// assertion checks that hit_valid arrives then. done rises once the last
// response is checked, 10N+2B+CMP_LATENCY cycles after start, and stays
// until the next start; pass = done with no failing compare. n_writes and
// n_compares count the operations issued. Column j is comparand bit j, so
// TE3 starts with X..X0 as in the worked example.
module th_bist
  import tcam_pkg::*;
#(
  parameter int N = 3,
  parameter int B = 3,
  parameter bit DESCENDING = 1'b0   // run the word loops from N-1 down to 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  // TCAM operation port
  output tcam_op_e                  op,
  output logic [addr_width(N)-1:0]  addr,
  output logic [B-1:0]              wdata,
  output logic [B-1:0]              wcare,
  input  logic                      hit_valid,
  input  logic                      hit,
  // status
  output th_elem_e                  elem,
  output logic                      busy,
  output logic                      done,
  output logic                      pass,
  output logic [NUM_E-1:0]          syndrome,
  output logic [31:0]               fail_count,
  output logic [31:0]               n_writes,
  output logic [31:0]               n_compares
);

  localparam int AW = addr_width(N);
  localparam int CW = addr_width(B);
  localparam logic [B-1:0] ONES = '1;

  logic [AW-1:0] a;      // word address
  logic [2:0]    sub;    // operation within a march element
  logic [CW-1:0] col;    // column of TE3/TE6

  // Operation of the current cycle.
  logic       is_cmp, exp_hit;
  logic [2:0] e_idx;
  logic       last_op;   // last operation of the current element

  always_comb begin
    op      = OP_NOP;
    addr    = DESCENDING ? AW'(N - 1 - int'(a)) : a;
    wdata   = '0;
    wcare   = '0;
    is_cmp  = 1'b0;
    exp_hit = 1'b0;
    e_idx   = '0;
    last_op = 1'b0;
    unique case (elem)
      TE1: begin
        op = OP_WRITE; wdata = ONES; wcare = ONES;
        last_op = (int'(a) == N - 1);
      end
      TE2: begin
        unique case (sub)
          3'd0:    begin op = OP_WRITE; end                        // wX
          3'd1:    begin op = OP_COMPARE; wcare = ONES;            // cP0
                         is_cmp = 1'b1; exp_hit = 1'b1; e_idx = 3'd0; end
          3'd2:    begin op = OP_WRITE; wcare = ONES; end          // w0
          3'd3:    begin op = OP_COMPARE; wcare = ONES;            // cP0
                         is_cmp = 1'b1; exp_hit = 1'b1; e_idx = 3'd1; end
          default: begin op = OP_WRITE; wdata = ONES; wcare = ONES; end // w1
        endcase
        last_op = (int'(a) == N - 1) && (sub == 3'd4);
      end
      TE3: begin
        op = OP_COMPARE; wcare = B'(1) << col;
        is_cmp = 1'b1; exp_hit = 1'b0; e_idx = 3'd2;
        last_op = (int'(col) == B - 1);
      end
      TE4: begin
        op = OP_WRITE; wcare = ONES;
        last_op = (int'(a) == N - 1);
      end
      TE5: begin
        unique case (sub)
          3'd0:    begin op = OP_WRITE; wdata = ONES; wcare = ONES; end   // w1
          3'd1:    begin op = OP_COMPARE; wdata = ONES; wcare = ONES;     // cP1
                         is_cmp = 1'b1; exp_hit = 1'b1; e_idx = 3'd3; end
          default: begin op = OP_WRITE; wcare = ONES; end                 // w0
        endcase
        last_op = (int'(a) == N - 1) && (sub == 3'd2);
      end
      TE6: begin
        op = OP_COMPARE; wcare = B'(1) << col; wdata = B'(1) << col;
        is_cmp = 1'b1; exp_hit = 1'b0; e_idx = 3'd4;
        last_op = (int'(col) == B - 1);
      end
      default: ;
    endcase
  end

  // Sequencer.
  logic running;
  assign running = (elem != TE_IDLE) && (elem != TE_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elem <= TE_IDLE;
      a    <= '0;
      sub  <= '0;
      col  <= '0;
    end else if (start && !running) begin
      elem <= TE1;
      a    <= '0;
      sub  <= '0;
      col  <= '0;
    end else if (running) begin
      if (last_op) begin
        elem <= (elem == TE6) ? TE_DONE : th_elem_e'(elem + 3'd1);
        a    <= '0;
        sub  <= '0;
        col  <= '0;
      end else begin
        unique case (elem)
          TE1, TE4: a <= a + 1'b1;
          TE2: if (sub == 3'd4) begin sub <= '0; a <= a + 1'b1; end
               else sub <= sub + 3'd1;
          TE5: if (sub == 3'd2) begin sub <= '0; a <= a + 1'b1; end
               else sub <= sub + 3'd1;
          default: col <= col + 1'b1;   // TE3, TE6
        endcase
      end
    end
  end

  // Expected responses, delayed to line up with the TCAM's Hit output.
  logic [CMP_LATENCY-1:0]      pv;
  logic [CMP_LATENCY-1:0]      pexp;
  logic [CMP_LATENCY-1:0][2:0] pe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv   <= '0;
      pexp <= '0;
      pe   <= '0;
    end else begin
      pv[0]   <= running && is_cmp;
      pexp[0] <= exp_hit;
      pe[0]   <= e_idx;
      for (int i = 1; i < CMP_LATENCY; i++) begin
        pv[i]   <= pv[i-1];
        pexp[i] <= pexp[i-1];
        pe[i]   <= pe[i-1];
      end
    end
  end

  logic chk, bad;
  assign chk = pv[CMP_LATENCY-1];
  assign bad = chk && (hit != pexp[CMP_LATENCY-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syndrome   <= '0;
      fail_count <= '0;
      n_writes   <= '0;
      n_compares <= '0;
    end else if (start && !running) begin
      syndrome   <= '0;
      fail_count <= '0;
      n_writes   <= '0;
      n_compares <= '0;
    end else begin
      if (running && op == OP_WRITE)   n_writes   <= n_writes + 1;
      if (running && op == OP_COMPARE) n_compares <= n_compares + 1;
      if (bad) begin
        syndrome[pe[CMP_LATENCY-1]] <= 1'b1;
        fail_count <= fail_count + 1;
      end
    end
  end

  assign busy = running || (|pv);
  assign done = (elem == TE_DONE) && !(|pv);
  assign pass = done && (fail_count == 0);

  // A compare response must arrive exactly when it is expected.
  a_resp_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    chk |-> hit_valid);

endmodule
