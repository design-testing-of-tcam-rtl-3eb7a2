// tb_tcam_word: random ternary words and comparands against a reference
// compare, the Valid bit (an unwritten word never matches, reset clears
// it), the read-back bits, and single-cell fault injection.
module tb_tcam_word;
  import tcam_pkg::*;
  import tb_ref_pkg::*;
  localparam int B = 6;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, we, fi_en, valid, ml;
  logic [B-1:0] wdata, wcare, c_care, c_val, rd_data, rd_care;
  logic [addr_width(B)-1:0] fi_bit;
  cell_fault_e fi_kind;
  int checks = 0, failures = 0;
  logic [B-1:0] s_val, s_care;

  tcam_word #(.B(B)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_ml(cell_fault_e f, int fb, logic en);
    logic m = 1'b1;
    for (int b = 0; b < B; b++)
      m &= ref_cell_match(s_val[b], s_care[b], c_val[b], c_care[b],
                          (en && b == fb) ? f : F_NONE);
    return m;
  endfunction

  initial begin
    rst_n = 0; we = 0; fi_en = 0; fi_bit = 0; fi_kind = F_NONE;
    wdata = 0; wcare = 0; c_care = 0; c_val = 0;
    #12 rst_n = 1;
    @(negedge clk);
    checks++;
    if (ml !== 1'b0 || valid !== 1'b0) begin failures++; $display("FAIL unwritten word matches"); end
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      we = 1; wdata = B'($urandom); wcare = B'($urandom);
      s_care = wcare; s_val = wdata & wcare;
      @(negedge clk);
      we = 0;
      checks++;
      if (rd_data !== s_val || rd_care !== s_care || valid !== 1'b1) begin
        failures++; $display("FAIL readback %b/%b", rd_data, rd_care);
      end
      for (int k = 0; k < 8; k++) begin
        c_care = B'($urandom);
        // half of the comparands are made to match the stored word
        c_val = (k < 4) ? ((s_val & c_care) | (B'($urandom) & ~(c_care & s_care)))
                        : B'($urandom);
        fi_en = (it % 3 == 0);
        fi_bit = addr_width(B)'($urandom_range(B - 1));
        fi_kind = cell_fault_e'($urandom_range(int'(F_M4_SOP)));
        #1;
        checks++;
        if (ml !== ref_ml(fi_kind, int'(fi_bit), fi_en)) begin
          failures++;
          $display("FAIL ml=%b s=%b/%b c=%b/%b fault=%s@%0d en=%b", ml, s_val, s_care,
                   c_val, c_care, fi_kind.name(), fi_bit, fi_en);
        end
      end
      fi_en = 0;
    end
    rst_n = 0; #1; rst_n = 1;
    c_care = '0; #1;
    checks++;
    if (ml !== 1'b0) begin failures++; $display("FAIL reset does not clear Valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
