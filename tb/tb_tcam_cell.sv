// tb_tcam_cell: exhaustive check of one asymmetric TCAM cell.
// For every fault model, every stored value (0, 1, X) and every comparand
// bit (0, 1, X) the cell's match output is compared with the reference
// response table; the stored Q_U/Q_L bits are checked after each write.
module tb_tcam_cell;
  import tcam_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic we, wdata, wcare, c_care, c_val, q_u, q_l, match;
  cell_fault_e fault;
  int checks = 0, failures = 0;

  tcam_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wdata = 0; wcare = 0; c_care = 0; c_val = 0; fault = F_NONE;
    for (int f = 0; f <= int'(F_M4_SOP); f++) begin
      for (int s = 0; s < 3; s++) begin
        @(negedge clk);
        we = 1; wdata = (s == 1); wcare = (s != 2);
        @(negedge clk);
        we = 0; wdata = ~wdata;   // must not disturb the cell
        checks++;
        if (q_u !== (s == 1) || q_l !== (s != 2)) begin
          failures++;
          $display("FAIL store s=%0d q_u=%b q_l=%b", s, q_u, q_l);
        end
        for (int c = 0; c < 3; c++) begin
          fault = cell_fault_e'(f); c_val = (c == 1); c_care = (c != 2);
          #1;
          checks++;
          if (match !== ref_cell_match(s == 1, s != 2, c == 1, c != 2, cell_fault_e'(f))) begin
            failures++;
            $display("FAIL fault=%s stored=%0d comp=%0d match=%b", fault.name(), s, c, match);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
