// tb_tcam_th_top: end-to-end test of the TCAM with its T_H test controller,
// at the default 3 x 3 size.
// Normal mode: Writes, Reads, Compares that hit and miss, stored X and
// comparand X bits, several matching words (priority address), and a word
// that was never written (invalid, never matches).
// Test mode: a fault-free T_H run passes in 10N+2B operation cycles with
// 7N Writes and 3N+2B Compares; then every fault type in every cell is
// injected and must be caught with its fault-dictionary syndrome. After a
// test the array holds all-0 words (TE5 ends with w0), checked by reads in
// normal mode; the array contents are also checked at the start of TE2,
// TE3, TE5 and TE6 (all 1, all 1, all 0, all 0). The readout of all matching addresses returns both
// matches of a key in order and restores the array. Each mechanism is counted and must occur at least once.
module tb_tcam_th_top;
  import tcam_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 3, B = 3;     // the defaults of tcam_th_top
  localparam int AW = addr_width(N);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  tcam_op_e op;
  logic [AW-1:0] addr, pae_addr, fi_word;
  logic [B-1:0] wdata, wcare, rdata, rcare;
  logic hit_valid, hit, pae_found, rvalid, fi_en;
  logic test_mode, test_start, test_busy, test_done, test_pass;
  th_elem_e test_elem;
  logic [NUM_E-1:0] test_syndrome;
  logic [31:0] test_fail_count, test_writes, test_compares;
  logic enum_start, enum_busy, enum_done, enum_found_valid;
  logic [B-1:0] enum_key, enum_care;
  logic [AW-1:0] enum_found_addr;
  logic [AW:0] enum_found_count;
  int enum_got[$];
  logic [addr_width(B)-1:0] fi_bit;
  cell_fault_e fi_kind;

  tcam_th_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_write = 0, n_read = 0, n_hit = 0, n_miss = 0, n_xstored = 0, n_xcomp = 0;
  int n_prio = 0, n_invalid = 0, n_test_pass = 0, n_detect = 0, n_mode = 0;
  int n_elem[7];

  int n_enum = 0, n_state = 0;

  // Array contents between test elements: all 1 after TE1 and TE2, all 0
  // after TE4 and TE5 (storage is never affected by a comparison fault).
  logic [N-1:0][B-1:0] arr_d, arr_c;
  for (genvar w = 0; w < N; w++) begin : g_peek
    assign arr_d[w] = dut.u_tcam.g_word[w].u_word.rd_data;
    assign arr_c[w] = dut.u_tcam.g_word[w].u_word.rd_care;
  end
  th_elem_e prev_elem = TE_IDLE;
  always @(negedge clk) begin
    if (test_elem != prev_elem &&
        (test_elem == TE2 || test_elem == TE3 || test_elem == TE5 || test_elem == TE6)) begin
      logic [B-1:0] v;
      v = (test_elem == TE2 || test_elem == TE3) ? '1 : '0;
      for (int w = 0; w < N; w++)
        check(arr_d[w] == v && arr_c[w] == '1,
              $sformatf("word %0d at start of %s holds %b/%b", w, test_elem.name(), arr_d[w], arr_c[w]));
      n_state++;
    end
    prev_elem = test_elem;
  end

  always @(posedge clk)
    if (test_busy) n_elem[int'(test_elem)]++;
  always @(posedge clk)
    if (enum_found_valid) enum_got.push_back(int'(enum_found_addr));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_write(int a, logic [B-1:0] d, logic [B-1:0] c);
    op = OP_WRITE; addr = AW'(a); wdata = d; wcare = c;
    @(negedge clk);
    op = OP_NOP;
    n_write++;
  endtask

  task automatic do_read(int a, logic [B-1:0] ed, logic [B-1:0] ec);
    op = OP_READ; addr = AW'(a);
    @(negedge clk);
    op = OP_NOP;
    check(rvalid && rdata == ed && rcare == ec, $sformatf("read word %0d: %b/%b exp %b/%b",
          a, rdata, rcare, ed, ec));
    n_read++;
  endtask

  // expect: hit, and if hit the priority address; response after 2 cycles
  task automatic do_compare(logic [B-1:0] d, logic [B-1:0] c, logic eh, int ea);
    op = OP_COMPARE; wdata = d; wcare = c;
    @(negedge clk);
    op = OP_NOP;
    check(!hit_valid, "compare answered after one cycle");
    @(negedge clk);
    check(hit_valid && hit == eh && pae_found == eh && (!eh || int'(pae_addr) == ea),
          $sformatf("compare %b/%b: hit=%b addr=%0d exp %b %0d", d, c, hit, pae_addr, eh, ea));
    if (eh) n_hit++; else n_miss++;
    if (c != '1) n_xcomp++;
  endtask

  task automatic run_th(output int cycles);
    test_mode = 1;
    @(negedge clk);
    test_start = 1;
    @(negedge clk);
    test_start = 0;
    cycles = 1;
    while (!test_done && cycles < 1000) begin @(negedge clk); cycles++; end
    check(test_done, "T_H run finished");
  endtask

  initial begin
    int cycles;
    rst_n = 0; op = OP_NOP; addr = 0; wdata = 0; wcare = 0;
    test_mode = 0; test_start = 0; enum_start = 0; enum_key = 0; enum_care = 0;
    fi_en = 0; fi_word = 0; fi_bit = 0; fi_kind = F_NONE;
    for (int i = 0; i < 7; i++) n_elem[i] = 0;
    #12 rst_n = 1;
    @(negedge clk);

    // ---- normal mode
    do_compare('0, '0, 1'b0, 0);           // nothing valid yet: all-X comparand misses
    n_invalid++;
    do_write(0, 3'b101, 3'b111);           // word0 = 101
    do_write(2, 3'b000, 3'b011);           // word2 = X00
    n_xstored++;
    do_read(0, 3'b101, 3'b111);
    do_read(2, 3'b000, 3'b011);
    do_compare(3'b101, 3'b111, 1'b1, 0);   // exact hit on word0
    do_compare(3'b100, 3'b111, 1'b1, 2);   // hits word2 through its X bit
    do_compare(3'b111, 3'b111, 1'b0, 0);   // miss
    do_compare(3'b011, 3'b011, 1'b0, 0);   // X11 misses both
    do_compare(3'b000, 3'b000, 1'b1, 0);   // XXX: both valid words match, word0 wins
    n_prio++;
    do_compare(3'b100, 3'b100, 1'b1, 0);   // 1XX: word0 and word2, word0 wins
    n_prio++;
    // word1 is still invalid: a comparand it would match must not hit
    do_compare(3'b010, 3'b111, 1'b0, 0);
    n_invalid++;
    do_write(1, 3'b010, 3'b111);
    do_compare(3'b010, 3'b111, 1'b1, 1);
    do_compare(3'b001, 3'b001, 1'b1, 0);   // XX1: word0 (101) only

    // ---- readout of all matches: words are 101, 010, X00; key XX0 matches
    // words 1 and 2, which must come out in that order
    begin
      int exp_l[$];
      exp_l = '{1, 2};
      enum_got = {};
      enum_key = 3'b000; enum_care = 3'b001;
      enum_start = 1; @(negedge clk); enum_start = 0;
      while (!enum_done) @(negedge clk);
      check(enum_got == exp_l && enum_found_count == 2,
            $sformatf("all-match readout got %p", enum_got));
      n_enum++;
      do_read(0, 3'b101, 3'b111);
      do_read(1, 3'b010, 3'b111);
      do_read(2, 3'b000, 3'b011);
    end

    // ---- test mode, fault free
    n_mode++;
    run_th(cycles);
    check(test_pass && test_syndrome == 0, "fault-free T_H passes");
    check(cycles == 1 + 10 * N + 2 * B + CMP_LATENCY, $sformatf("T_H took %0d cycles", cycles));
    check(test_writes == 7 * N, "7N writes");
    check(test_compares == 3 * N + 2 * B, "3N+2B compares");
    if (test_pass) n_test_pass++;
    $display("T_H fault free: %0d cycles, %0d writes, %0d compares", cycles, test_writes, test_compares);

    // ---- back to normal mode: the test leaves all-0 words
    test_mode = 0; n_mode++;
    @(negedge clk);
    for (int w = 0; w < N; w++) do_read(w, '0, '1);
    do_compare('0, '1, 1'b1, 0);
    do_compare(3'b010, 3'b010, 1'b0, 0);

    // ---- every fault type in every cell
    for (int f = 1; f <= int'(F_M4_SOP); f++) begin
      int ok;
      ok = 0;
      for (int w = 0; w < N; w++)
        for (int b = 0; b < B; b++) begin
          fi_en = 1; fi_kind = cell_fault_e'(f); fi_word = AW'(w); fi_bit = addr_width(B)'(b);
          run_th(cycles);
          check(!test_pass && test_syndrome == fault_dict(fi_kind),
                $sformatf("%s in cell (%0d,%0d): syndrome %b exp %b", fi_kind.name(), w, b,
                          test_syndrome, fault_dict(fi_kind)));
          if (!test_pass) begin n_detect++; ok++; end
        end
      $display("%-8s caught in %0d of %0d cells, syndrome(E4..E0)=%b", fi_kind.name(), ok,
               N * B, fault_dict(cell_fault_e'(f)));
    end
    fi_en = 0;
    run_th(cycles);
    check(test_pass, "fault-free pass after fault removal");
    if (test_pass) n_test_pass++;

    // ---- mechanism coverage
    check(n_write > 0 && n_read > 0, "write and read happened");
    check(n_hit > 0 && n_miss > 0, "hit and miss happened");
    check(n_xstored > 0 && n_xcomp > 0, "stored X and comparand X happened");
    check(n_prio > 0 && n_invalid > 0, "priority choice and invalid word happened");
    check(n_test_pass > 0 && n_detect == 12 * N * B, "T_H pass and every detection happened");
    check(n_mode >= 2, "mode switches happened");
    check(n_enum > 0, "all-match readout happened");
    check(n_state > 0, "array states between test elements checked");
    for (int e = int'(TE1); e <= int'(TE6); e++)
      check(n_elem[e] > 0, $sformatf("test element TE%0d applied", e));
    $display("mechanisms: writes=%0d reads=%0d hits=%0d misses=%0d priority=%0d detections=%0d",
             n_write, n_read, n_hit, n_miss, n_prio, n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
