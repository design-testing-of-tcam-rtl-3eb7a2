// tb_th_bist: the T_H controller driving a 6 x 5 TCAM, run twice at once,
// once with ascending and once with descending word loops.
// For each:
// - The operation stream is compared, cycle by cycle, with the T_H
//   sequence generated from the test description (TE1..TE6).
// - done must rise 10N+2B+2 clock edges after the edge that samples start,
//   with 7N Writes and 3N+2B Compares counted.
// - A fault-free TCAM passes with an empty syndrome.
// - One faulty cell of each fault type, placed at random, must fail with
//   exactly the fault-dictionary syndrome of that type.
module tb_th_bist;
  logic fin_a, fin_d;
  int   chk_a, chk_d, fail_a, fail_d;

  th_bist_harness #(.DESC(1'b0)) u_asc  (.finished(fin_a), .checks(chk_a), .failures(fail_a));
  th_bist_harness #(.DESC(1'b1)) u_desc (.finished(fin_d), .checks(chk_d), .failures(fail_d));

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_d, fail_a + fail_d + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin_a && fin_d);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_d, fail_a + fail_d);
    $finish;
  end
endmodule
