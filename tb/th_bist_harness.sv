// th_bist_harness: checks the T_H controller driving a 6 x 5 TCAM, with
// the word loops ascending (DESC = 0) or descending (DESC = 1).
// - The operation stream is compared, cycle by cycle, with the T_H
//   sequence generated here from the test description (TE1..TE6).
// - done must rise 10N+2B+2 clock edges after the edge that samples start, with 7N Writes and
//   3N+2B Compares counted.
// - A fault-free TCAM passes with an empty syndrome.
// - One faulty cell of each fault type, placed at random, must fail with
//   exactly the fault-dictionary syndrome of that type.
module th_bist_harness #(
  parameter bit DESC = 1'b0
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import tcam_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 6, B = 5;
  localparam int AW = addr_width(N);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start;
  tcam_op_e op;
  logic [AW-1:0] addr, pae_addr, fi_word;
  logic [B-1:0] wdata, wcare, rdata, rcare;
  logic hit_valid, hit, pae_found, rvalid, fi_en;
  logic [addr_width(B)-1:0] fi_bit;
  cell_fault_e fi_kind;
  th_elem_e elem;
  logic busy, done, pass;
  logic [NUM_E-1:0] syndrome;
  logic [31:0] fail_count, n_writes, n_compares;

  th_bist #(.N(N), .B(B), .DESCENDING(DESC)) dut (.*);
  tcam #(.N(N), .B(B)) u_tcam (.*);


  typedef struct { tcam_op_e op; int a; logic [B-1:0] d, c; } op_t;
  op_t seq[$];

  function automatic void push(tcam_op_e o, int a, logic [B-1:0] d, logic [B-1:0] c);
    op_t x;
    x.op = o; x.a = a; x.d = d & c; x.c = c;
    seq.push_back(x);
  endfunction

  function automatic int wa(int i);
    return DESC ? N - 1 - i : i;
  endfunction

  // T_H, word loops in the chosen order
  function automatic void build_seq();
    logic [B-1:0] ones;
    ones = '1;
    seq.delete();
    for (int a = 0; a < N; a++) push(OP_WRITE, wa(a), ones, ones);                 // TE1
    for (int a = 0; a < N; a++) begin                                          // TE2
      push(OP_WRITE, wa(a), '0, '0);
      push(OP_COMPARE, -1, '0, ones);
      push(OP_WRITE, wa(a), '0, ones);
      push(OP_COMPARE, -1, '0, ones);
      push(OP_WRITE, wa(a), ones, ones);
    end
    for (int j = 0; j < B; j++) push(OP_COMPARE, -1, '0, B'(1) << j);          // TE3
    for (int a = 0; a < N; a++) push(OP_WRITE, wa(a), '0, ones);                   // TE4
    for (int a = 0; a < N; a++) begin                                          // TE5
      push(OP_WRITE, wa(a), ones, ones);
      push(OP_COMPARE, -1, ones, ones);
      push(OP_WRITE, wa(a), '0, ones);
    end
    for (int j = 0; j < B; j++) push(OP_COMPARE, -1, B'(1) << j, B'(1) << j); // TE6
  endfunction


  task automatic run_test(output int cycles);
    int i;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    i = 0;
    while (!done && cycles < 10000) begin
      if (i < seq.size()) begin
        checks++;
        if (op !== seq[i].op || (op != OP_COMPARE && int'(addr) != seq[i].a) ||
            wcare !== seq[i].c || (wdata & wcare) !== seq[i].d) begin
          failures++;
          $display("FAIL op %0d: %s a=%0d d=%b c=%b exp %s a=%0d d=%b c=%b", i, op.name(), addr,
                   wdata, wcare, seq[i].op.name(), seq[i].a, seq[i].d, seq[i].c);
        end
      end else begin
        checks++;
        if (op != OP_NOP) begin failures++; $display("FAIL op after end of test"); end
      end
      i++;
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cycles;
    finished = 0; checks = 0; failures = 0;
    rst_n = 0; start = 0;
    fi_en = 0; fi_word = 0; fi_bit = 0; fi_kind = F_NONE;
    build_seq();
    #12 rst_n = 1;
    // fault free
    run_test(cycles);
    $display("order %s, fault free: %0d cycles, %0d writes, %0d compares, pass=%b syndrome=%b",
             DESC ? "descending" : "ascending", cycles, n_writes, n_compares, pass, syndrome);
    // start is sampled one edge after it is raised; then 10N+2B operation
    // cycles and 2 cycles of compare latency
    checks++;
    if (cycles != 1 + 10 * N + 2 * B + CMP_LATENCY) begin failures++; $display("FAIL cycle count %0d", cycles); end
    checks++;
    if (n_writes != 7 * N || n_compares != 3 * N + 2 * B) begin failures++; $display("FAIL op counts"); end
    checks++;
    if (!pass || syndrome != 0 || fail_count != 0) begin failures++; $display("FAIL fault-free run"); end
    // each fault type, three random places
    for (int f = 1; f <= int'(F_M4_SOP); f++)
      for (int rep = 0; rep < 3; rep++) begin
        fi_en = 1;
        fi_kind = cell_fault_e'(f);
        fi_word = AW'($urandom_range(N - 1));
        fi_bit = addr_width(B)'($urandom_range(B - 1));
        run_test(cycles);
        checks++;
        if (pass || syndrome !== fault_dict(fi_kind) || fail_count == 0) begin
          failures++;
          $display("FAIL %s at (%0d,%0d): pass=%b syndrome(E4..E0)=%b expected %b", fi_kind.name(),
                   fi_word, fi_bit, pass, syndrome, fault_dict(fi_kind));
        end else if (rep == 0)
          $display("%s %-8s detected, syndrome(E4..E0)=%b, %0d failing compares", DESC ? "desc" : "asc", fi_kind.name(),
                   syndrome, fail_count);
      end
    finished = 1;
  end
endmodule
