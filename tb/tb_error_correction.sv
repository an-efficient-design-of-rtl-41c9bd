// tb_error_correction: self-checking testbench of the error locator and
// result rebuild, P = 4, N = 20.
//
// Each test builds four consistent 21-bit result vectors, the check values
// and the summed result that a fault-free datapath would give, then damages
// them: nothing; one result item of MVM p; several items of MVM p; one check
// value. The expected syndrome comes from the (7,4) Hamming columns written
// out by hand (MVM 0..3 -> 3, 5, 6, 7); the corrected outputs must equal the
// undamaged results. The block is combinational: outputs are checked once
// the inputs have settled.
module tb_error_correction;
  localparam int P  = 4;
  localparam int N  = 20;
  localparam int ZW = 21;
  localparam int SW = 28;
  localparam int YW = 23;
  localparam int R  = 3;
  localparam int HCOL [P] = '{3, 5, 6, 7};

  logic signed [ZW-1:0] z     [P][N];
  logic signed [SW-1:0] s     [R];
  logic signed [YW-1:0] sum_z [N];
  logic signed [ZW-1:0] y     [P][N];
  logic [R-1:0]         syndrome;
  logic [P-1:0]         corrected;
  logic                 check_err;
  logic                 uncorrectable;

  int checks = 0;
  int failures = 0;
  int n_fixed [P];
  int n_check = 0;
  int n_clean = 0;

  error_correction #(.P(P), .ROWS(N), .ZW(ZW), .SW(SW), .YW(YW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // kind: 0 none, 1 one item of MVM p, 2 several items of MVM p, 3 check row j
  task automatic run_test(input int kind, input int p_bad, input int j_bad);
    int zt [P][N];
    longint st [R];
    int exp_syn;
    for (int p = 0; p < P; p++)
      for (int r = 0; r < N; r++) zt[p][r] = int'($urandom_range(983040)) - 491520;
    for (int j = 0; j < R; j++) begin
      st[j] = 0;
      for (int p = 0; p < P; p++)
        if ((HCOL[p] >> j) & 1)
          for (int r = 0; r < N; r++) st[j] += zt[p][r];
    end
    for (int r = 0; r < N; r++) begin
      int tot;
      tot = 0;
      for (int p = 0; p < P; p++) begin
        z[p][r] = ZW'(zt[p][r]);
        tot += zt[p][r];
      end
      sum_z[r] = YW'(tot);
    end
    for (int j = 0; j < R; j++) s[j] = SW'(st[j]);
    exp_syn = 0;
    if (kind == 1) begin
      int r;
      r = int'($urandom_range(N - 1));
      z[p_bad][r] = z[p_bad][r] ^ ZW'(1 << $urandom_range(ZW - 1));
      exp_syn = HCOL[p_bad];
    end else if (kind == 2) begin
      for (int r = 0; r < N; r += 3) z[p_bad][r] = z[p_bad][r] + ZW'(r + 1);
      exp_syn = HCOL[p_bad];
    end else if (kind == 3) begin
      s[j_bad] = s[j_bad] ^ SW'(1 << $urandom_range(SW - 1));
      exp_syn = 1 << j_bad;
    end
    #1;
    check(int'(syndrome) == exp_syn, $sformatf("syndrome %0d expected %0d", syndrome, exp_syn));
    check(corrected == ((kind == 1 || kind == 2) ? P'(1 << p_bad) : '0), "corrected flag");
    check(check_err == (kind == 3), "check_err flag");
    check(uncorrectable == 1'b0, "uncorrectable flag");
    for (int p = 0; p < P; p++)
      for (int r = 0; r < N; r++)
        check(int'(y[p][r]) == zt[p][r],
              $sformatf("kind %0d: y[%0d][%0d]=%0d expected %0d", kind, p, r, y[p][r], zt[p][r]));
    if (kind == 0) n_clean++;
    if (kind == 1 || kind == 2) n_fixed[p_bad]++;
    if (kind == 3) n_check++;
    #1;
  endtask

  initial begin
    for (int p = 0; p < P; p++) n_fixed[p] = 0;
    for (int t = 0; t < 8; t++) begin
      run_test(0, 0, 0);
      for (int p = 0; p < P; p++) begin
        run_test(1, p, 0);
        run_test(2, p, 0);
      end
      for (int j = 0; j < R; j++) run_test(3, 0, j);
    end
    for (int p = 0; p < P; p++) check(n_fixed[p] > 0, "every MVM corrected at least once");
    check(n_check > 0 && n_clean > 0, "check-branch and clean cases run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
