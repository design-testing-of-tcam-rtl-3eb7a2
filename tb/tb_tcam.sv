// tb_tcam: random Write/Read/Compare traffic on an 8 x 6 TCAM against a
// ternary reference model. Checks Hit, the priority address (lowest
// matching word), read data, invalid words never matching, the 1-cycle
// Read and 2-cycle Compare latency, and that a Compare is not disturbed by
// a Write in the following cycle. Part of the run has one faulty cell.
module tb_tcam;
  import tcam_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 8, B = 6;
  localparam int AW = addr_width(N);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  tcam_op_e op;
  logic [AW-1:0] addr, pae_addr, fi_word;
  logic [B-1:0] wdata, wcare, rdata, rcare;
  logic hit_valid, hit, pae_found, rvalid, fi_en;
  logic [addr_width(B)-1:0] fi_bit;
  cell_fault_e fi_kind;

  tcam #(.N(N), .B(B)) dut (.*);

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_multi = 0;
  logic [B-1:0] m_val[N], m_care[N];
  logic m_valid[N];

  // expected results, index 0 = due at this negedge
  logic        eh_v[3], eh_hit[3], eh_found[3];
  int          eh_addr[3];
  logic        er_v[2];
  logic [B-1:0] er_d[2], er_c[2];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic word_match(int w, logic [B-1:0] cv, logic [B-1:0] cc);
    logic m = m_valid[w];
    for (int b = 0; b < B; b++)
      m &= ref_cell_match(m_val[w][b], m_care[w][b], cv[b], cc[b],
                          (fi_en && int'(fi_word) == w && int'(fi_bit) == b) ? fi_kind : F_NONE);
    return m;
  endfunction

  task automatic check_outputs();
    checks++;
    if (hit_valid !== eh_v[0] ||
        (eh_v[0] && (hit !== eh_hit[0] || pae_found !== eh_found[0] ||
                     (eh_found[0] && int'(pae_addr) != eh_addr[0])))) begin
      failures++;
      $display("FAIL compare: hv=%b hit=%b found=%b addr=%0d exp %b %b %b %0d", hit_valid, hit,
               pae_found, pae_addr, eh_v[0], eh_hit[0], eh_found[0], eh_addr[0]);
    end
    checks++;
    if (rvalid !== er_v[0] || (er_v[0] && (rdata !== er_d[0] || rcare !== er_c[0]))) begin
      failures++;
      $display("FAIL read: rv=%b %b/%b exp %b %b/%b", rvalid, rdata, rcare, er_v[0], er_d[0], er_c[0]);
    end
  endtask

  initial begin
    rst_n = 0; op = OP_NOP; addr = 0; wdata = 0; wcare = 0;
    fi_en = 0; fi_word = 0; fi_bit = 0; fi_kind = F_NONE;
    for (int w = 0; w < N; w++) m_valid[w] = 0;
    for (int i = 0; i < 3; i++) eh_v[i] = 0;
    for (int i = 0; i < 2; i++) er_v[i] = 0;
    #12 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int r, w;
      @(negedge clk);
      check_outputs();
      // advance the delay lines
      eh_v[0] = eh_v[1]; eh_hit[0] = eh_hit[1]; eh_found[0] = eh_found[1]; eh_addr[0] = eh_addr[1];
      eh_v[1] = 0;
      er_v[0] = 0;
      if (cyc % 5000 == 0) begin
        fi_en = (cyc >= 10000);
        fi_word = AW'($urandom_range(N - 1));
        fi_bit = addr_width(B)'($urandom_range(B - 1));
        fi_kind = cell_fault_e'($urandom_range(1, int'(F_M4_SOP)));
      end
      r = $urandom_range(99);
      w = $urandom_range(N - 1);
      addr = AW'(w);
      wdata = B'($urandom); wcare = B'($urandom | $urandom | $urandom);
      if (cyc < 6 * N) wcare = '1;     // some fully specified words first
      if (r < 35) begin
        op = OP_WRITE;
        m_val[w] = wdata & wcare; m_care[w] = wcare; m_valid[w] = 1;
      end else if (r < 50) begin
        op = OP_READ;
        er_v[0] = 1;
        er_d[0] = m_valid[w] ? m_val[w] : rdata;
        er_c[0] = m_care[w];
        if (!m_valid[w]) er_v[0] = 0;   // unwritten word: content undefined
      end else if (r < 95) begin
        int cnt;
        cnt = 0;
        op = OP_COMPARE;
        // often aim at a stored word so that hits are frequent
        if (r < 80 && m_valid[w]) wdata = (m_val[w] & wcare) | (wdata & ~m_care[w]);
        eh_v[1] = 1; eh_found[1] = 0; eh_addr[1] = 0;
        for (int k = N - 1; k >= 0; k--)
          if (word_match(k, wdata & wcare, wcare)) begin
            eh_found[1] = 1; eh_addr[1] = k; cnt++;
          end
        eh_hit[1] = eh_found[1];
        if (cnt == 0) n_miss++; else n_hit++;
        if (cnt > 1) n_multi++;
      end else begin
        op = OP_NOP;
      end
      // a read of an unwritten word is skipped by the check (two-state sim)
      if (op == OP_READ && !m_valid[w]) op = OP_NOP;
    end
    @(negedge clk); check_outputs();
    $display("compares: %0d hit, %0d miss, %0d with several matching words", n_hit, n_miss, n_multi);
    checks++;
    if (n_hit < 100 || n_miss < 100 || n_multi < 10) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
