// tb_data_io: reads of random words, one cycle of latency, rvalid only
// for a read, and output held between reads.
module tb_data_io;
  localparam int N = 5, B = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, rd_en, rvalid;
  logic [N-1:0] sel;
  logic [N-1:0][B-1:0] word_data, word_care;
  logic [B-1:0] rdata, rcare, e_data, e_care;
  logic e_valid;
  int checks = 0, failures = 0;

  data_io #(.N(N), .B(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; rd_en = 0; sel = '0;
    for (int i = 0; i < N; i++) begin word_data[i] = B'($urandom); word_care[i] = B'($urandom); end
    #12 rst_n = 1;
    e_data = '0; e_care = '0; e_valid = 0;
    for (int it = 0; it < 300; it++) begin
      int w;
      @(negedge clk);
      checks++;
      if (rvalid !== e_valid || rdata !== e_data || rcare !== e_care) begin
        failures++; $display("FAIL it=%0d got %b/%b/%b", it, rvalid, rdata, rcare);
      end
      w = $urandom_range(N - 1);
      rd_en = ($urandom_range(2) != 0);
      sel = '0; if (rd_en) sel[w] = 1'b1;
      e_valid = rd_en;
      if (rd_en) begin e_data = word_data[w]; e_care = word_care[w]; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
