// tb_match_enum: the all-matches readout on an 8 x 6 TCAM.
// Random ternary contents and keys (each key with at least one care bit);
// the reported addresses must be exactly the matching words in ascending
// order, found_count must equal their number, the cycle count must be
// 6 per match + 3 + 1 per restored word, and afterwards every word must
// read back unchanged.
module tb_match_enum;
  import tcam_pkg::*;
  localparam int N = 8, B = 6;
  localparam int AW = addr_width(N);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done, found_valid;
  logic [B-1:0] key, key_care;
  tcam_op_e op, e_op, t_op;
  logic [AW-1:0] addr, e_addr, t_addr, pae_addr, found_addr;
  logic [AW:0] found_count;
  logic [B-1:0] wdata, wcare, e_wdata, e_wcare, t_wdata, t_wcare, rdata, rcare;
  logic hit_valid, hit, pae_found, rvalid;

  match_enum #(.N(N), .B(B)) dut (
    .clk, .rst_n, .start, .key, .key_care,
    .op(e_op), .addr(e_addr), .wdata(e_wdata), .wcare(e_wcare),
    .hit_valid, .pae_found, .pae_addr, .rvalid, .rdata, .rcare,
    .busy, .done, .found_valid, .found_addr, .found_count
  );

  assign t_op    = busy ? e_op    : op;
  assign t_addr  = busy ? e_addr  : addr;
  assign t_wdata = busy ? e_wdata : wdata;
  assign t_wcare = busy ? e_wcare : wcare;

  tcam #(.N(N), .B(B)) u_tcam (
    .clk, .rst_n, .op(t_op), .addr(t_addr), .wdata(t_wdata), .wcare(t_wcare),
    .hit_valid, .hit, .pae_found, .pae_addr, .rvalid, .rdata, .rcare,
    .fi_en(1'b0), .fi_word('0), .fi_bit('0), .fi_kind(F_NONE)
  );

  int checks = 0, failures = 0, n_multi = 0, n_none = 0;
  logic [B-1:0] m_val[N], m_care[N];
  int got[$];

  always @(posedge clk) if (found_valid) got.push_back(int'(found_addr));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic word_hits(int w);
    return ((m_val[w] ^ key) & m_care[w] & key_care) == '0;
  endfunction

  initial begin
    rst_n = 0; start = 0; op = OP_NOP; addr = 0; wdata = 0; wcare = 0; key = 0; key_care = 0;
    #12 rst_n = 1;
    for (int rnd = 0; rnd < 60; rnd++) begin
      int exp_list[$];
      int cycles;
      // new contents every few rounds
      if (rnd % 4 == 0)
        for (int w = 0; w < N; w++) begin
          @(negedge clk);
          op = OP_WRITE; addr = AW'(w);
          wdata = B'($urandom); wcare = B'($urandom | $urandom);
          m_val[w] = wdata & wcare; m_care[w] = wcare;
        end
      @(negedge clk);
      op = OP_NOP;
      key_care = B'($urandom) | (B'(1) << $urandom_range(B - 1));
      key = B'($urandom);
      if (rnd % 3 == 0) key = m_val[$urandom_range(N - 1)];   // make hits likely
      exp_list = {};
      for (int w = 0; w < N; w++) if (word_hits(w)) exp_list.push_back(w);
      got = {};
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
      checks++;
      if (got != exp_list || int'(found_count) != exp_list.size()) begin
        failures++;
        $display("FAIL key %b/%b: got %p expected %p", key, key_care, got, exp_list);
      end
      checks++;
      if (cycles != 1 + 6 * exp_list.size() + 3 + exp_list.size()) begin
        failures++;
        $display("FAIL %0d matches took %0d cycles", exp_list.size(), cycles);
      end
      if (exp_list.size() > 1) n_multi++;
      if (exp_list.size() == 0) n_none++;
      // contents restored
      for (int w = 0; w < N; w++) begin
        op = OP_READ; addr = AW'(w);
        @(negedge clk);
        op = OP_NOP;
        checks++;
        if (!rvalid || rdata !== m_val[w] || rcare !== m_care[w]) begin
          failures++;
          $display("FAIL word %0d not restored: %b/%b exp %b/%b", w, rdata, rcare, m_val[w], m_care[w]);
        end
      end
    end
    $display("rounds with several matches: %0d, with none: %0d", n_multi, n_none);
    checks++;
    if (n_multi == 0 || n_none == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
