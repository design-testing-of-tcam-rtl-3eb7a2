// tb_comparand_reg: reset to all-X, load on request, hold otherwise, and
// value bits cleared where the comparand bit is X.
module tb_comparand_reg;
  localparam int B = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, load;
  logic [B-1:0] care_in, val_in, c_care, c_val, e_care, e_val;
  int checks = 0, failures = 0;

  comparand_reg #(.B(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; care_in = '1; val_in = '1;
    #12 rst_n = 1;
    e_care = '0; e_val = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      checks++;
      if (c_care !== e_care || c_val !== e_val) begin
        failures++; $display("FAIL %b/%b exp %b/%b", c_val, c_care, e_val, e_care);
      end
      load = ($urandom_range(1) == 1);
      care_in = B'($urandom); val_in = B'($urandom);
      if (load) begin e_care = care_in; e_val = val_in & care_in; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
