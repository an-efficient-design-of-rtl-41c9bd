// tb_ft_mvm_pkg: self-checking testbench of the shared Hamming and width
// functions.
//
// Compares the Hamming columns with the integers of weight two or more
// listed by brute force here, the number of check rows with the
// single-error-correction bound 2^r - r - 1 >= P, the cover table with the
// columns, and the width helpers with the result widths of the design
// (21-bit MVM results, 13-bit column sums, 15-bit detection items, 28-bit
// check values for 8-bit items, N = 20, M = 30, P = 4).
module tb_ft_mvm_pkg;
  import ft_mvm_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    int p;
    logic [MAX_COVER-1:0] t;
    // Hamming columns: all integers >= 3 with at least two bits set.
    p = 0;
    for (v = 3; p < 100; v++)
      if ($countones(v) >= 2) begin
        check(hamming_col(p) == v, $sformatf("hamming_col(%0d)=%0d expected %0d", p, hamming_col(p), v));
        p++;
      end
    // Check rows.
    for (int n = 1; n <= 100; n++) begin
      int r;
      r = 2;
      while ((1 << r) - r - 1 < n) r++;
      check(check_rows(n) == r, $sformatf("check_rows(%0d)=%0d expected %0d", n, check_rows(n), r));
    end
    check(check_rows(4) == 3, "three check rows for four MVMs");
    check(check_rows(8) == 4, "four check rows for eight MVMs");
    // Cover table for P = 4 and P = 8.
    foreach (t[i]) t[i] = 1'b0;
    for (int pt = 4; pt <= 8; pt += 4) begin
      t = cover_table(pt);
      for (int j = 0; j < check_rows(pt); j++)
        for (int q = 0; q < pt; q++)
          check(t[j * pt + q] == ((hamming_col(q) >> j) & 1), $sformatf("cover P=%0d row %0d mvm %0d", pt, j, q));
    end
    t = cover_table(4);
    check(t[11:0] == 12'b1110_1101_1011, "P=4 cover table {row2,row1,row0}");
    // Widths.
    check(8 + 8 + sum_bits(30) == 21, "MVM result width 21");
    check(8 + sum_bits(20) == 13, "column sum width 13");
    check(13 + sum_bits(4) == 15, "detection item width 15");
    check(15 + 8 + sum_bits(30) == 28, "check value width 28");
    check(sum_bits(1) == 0 && sum_bits(2) == 1 && sum_bits(3) == 2 && sum_bits(32) == 5 && sum_bits(33) == 6,
          "sum_bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
