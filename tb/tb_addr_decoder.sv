// tb_addr_decoder: exhaustive check of the one-hot decoder for N = 5,
// including disabled decoding and out-of-range addresses.
module tb_addr_decoder;
  import tcam_pkg::*;
  localparam int N = 5;
  logic en;
  logic [addr_width(N)-1:0] addr;
  logic [N-1:0] sel;
  int checks = 0, failures = 0;

  addr_decoder #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < (1 << addr_width(N)); a++) begin
        logic [N-1:0] exp;
        en = e[0]; addr = a[addr_width(N)-1:0];
        exp = '0;
        if (e == 1 && a < N) exp[a] = 1'b1;
        #1;
        checks++;
        if (sel !== exp) begin failures++; $display("FAIL en=%0d a=%0d sel=%b", e, a, sel); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
