// tb_prio_addr_enc: exhaustive check for N = 6 (a width that is not a
// power of two): the lowest matching address wins.
module tb_prio_addr_enc;
  import tcam_pkg::*;
  localparam int N = 6;
  logic [N-1:0] ml;
  logic found;
  logic [addr_width(N)-1:0] addr;
  int checks = 0, failures = 0;

  prio_addr_enc #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int low;
      ml = v[N-1:0];
      low = 0;
      while (low < N && ((v >> low) & 1) == 0) low++;
      #1;
      checks++;
      if (found !== (v != 0) || (v != 0 && int'(addr) != low) || (v == 0 && addr != 0)) begin
        failures++; $display("FAIL ml=%b found=%b addr=%0d", ml, found, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
