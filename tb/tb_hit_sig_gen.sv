// tb_hit_sig_gen: exhaustive check of the Hit OR for N = 8.
module tb_hit_sig_gen;
  localparam int N = 8;
  logic [N-1:0] ml;
  logic hit;
  int checks = 0, failures = 0;

  hit_sig_gen #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      ml = v[N-1:0];
      #1;
      checks++;
      if (hit !== (v != 0)) begin failures++; $display("FAIL ml=%b hit=%b", ml, hit); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
