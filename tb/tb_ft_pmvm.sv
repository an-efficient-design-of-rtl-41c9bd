// tb_ft_pmvm: end-to-end self-checking testbench of ft_pmvm with every parameter at its default (P = 4, N = 20, M = 30, 8-bit items).
//
// Streams products of 4 random 20 x 30 matrices of 8-bit signed items with a
// shared random 30-item vector through the design, mostly back to back, once
// with gaps in the column stream. Soft errors are injected into the MVM
// results and check values through inj_z / inj_s: none; one flipped bit in one
// MVM; several damaged items of one MVM; one damaged check value. With P = 4 every syndrome decodes to some case, so the uncorrectable flag cannot rise and is checked to stay low.
// Reference results and syndromes are worked out here: integer products, and
// the Hamming columns of the MVMs written out by hand (MVM 0..3 -> 3, 5, 6, 7).
// Checks: corrected outputs equal the fault-free products (for uncorrectable
// cases the damaged results pass unchanged), the flags, the latency (results
// in the cycle after the last column) and the rate (one set of results every
// M cycles when the columns come back to back). Each mechanism is counted
// and one that never happened counts as a failure.
module tb_ft_pmvm;
  localparam int P  = 4;
  localparam int N  = 20;
  localparam int M  = 30;
  localparam int AW = 8;
  localparam int UW = 8;
  localparam int R  = 3;
  localparam int ZW = 21;
  localparam int SW = 28;
  localparam int HCOL [P] = '{3, 5, 6, 7};
  localparam int REPS = 3;

  // Fault scenarios, one per product.
  typedef enum int { F_NONE, F_BIT, F_MULTI, F_CHECK, F_DOUBLE } fault_e;
  typedef struct {
    fault_e kind;
    int     p;        // failed MVM (F_BIT, F_MULTI, first of F_DOUBLE)
    int     p2;       // second failed MVM (F_DOUBLE)
    int     j;        // failed check row (F_CHECK)
    bit     gaps;     // columns with idle cycles in between
  } scen_t;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [AW-1:0] a_col [P][N];
  logic signed [UW-1:0] u_i = '0;
  logic        [ZW-1:0] inj_z [P][N];
  logic        [SW-1:0] inj_s [R];
  logic                 out_valid;
  logic signed [ZW-1:0] y     [P][N];
  logic        [R-1:0]  syndrome;
  logic        [P-1:0]  corrected;
  logic                 check_err;
  logic                 uncorrectable;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int accepted = 0;
  int got = 0;
  int nprod = 0;
  int last_out_cycle = -1;

  scen_t   scen [$];
  int      last_col_cycle [$];
  longint  zt [$];               // fault-free results, P*N per product
  logic [ZW-1:0] inj_tab [$];    // injected masks, P*N per product
  logic [SW-1:0] inj_s_tab [$];  // injected check masks, R per product

  // Mechanism counters.
  int n_clean = 0, n_check = 0, n_unc = 0, n_b2b = 0, n_gap = 0;
  int n_fixed [P];

  ft_pmvm dut (
    .clk, .rst_n, .in_valid, .a_col, .u_i, .inj_z, .inj_s,
    .out_valid, .y, .syndrome, .corrected, .check_err, .uncorrectable
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Apply the injection of a product while its results are presented to
  // the correction stage (from the cycle after its last column).
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      accepted++;
      if (accepted % M == 0) begin
        int k;
        k = accepted / M - 1;
        last_col_cycle.push_back(cycle);
        for (int p = 0; p < P; p++)
          for (int r = 0; r < N; r++) inj_z[p][r] <= inj_tab[k * P * N + p * N + r];
        for (int j = 0; j < R; j++) inj_s[j] <= inj_s_tab[k * R + j];
      end
    end
  end

  // Check each set of results.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      scen_t sc;
      int exp_syn;
      logic [P-1:0] exp_corr;
      sc = scen[got];
      exp_syn = 0;
      exp_corr = '0;
      case (sc.kind)
        F_BIT, F_MULTI: begin exp_syn = HCOL[sc.p]; exp_corr[sc.p] = 1'b1; end
        F_CHECK:        exp_syn = 1 << sc.j;
        F_DOUBLE:       exp_syn = HCOL[sc.p] | HCOL[sc.p2];
        default:        exp_syn = 0;
      endcase
      check(int'(syndrome) == exp_syn,
            $sformatf("product %0d: syndrome %0d expected %0d", got, syndrome, exp_syn));
      check(corrected == exp_corr, $sformatf("product %0d: corrected %b", got, corrected));
      check(check_err == (sc.kind == F_CHECK), $sformatf("product %0d: check_err", got));
      check(uncorrectable == (sc.kind == F_DOUBLE), $sformatf("product %0d: uncorrectable", got));
      for (int p = 0; p < P; p++)
        for (int r = 0; r < N; r++) begin
          longint e;
          e = zt[got * P * N + p * N + r];
          if (sc.kind == F_DOUBLE)
            e = longint'($signed(ZW'(e) ^ inj_tab[got * P * N + p * N + r]));
          check(longint'(y[p][r]) == e,
                $sformatf("product %0d: y[%0d][%0d]=%0d expected %0d", got, p, r, y[p][r], e));
        end
      check(cycle == last_col_cycle[got] + 1,
            $sformatf("product %0d: %0d cycles after last column", got, cycle - last_col_cycle[got]));
      if (got > 0 && !sc.gaps && !scen[got - 1].gaps && last_col_cycle[got] - last_col_cycle[got - 1] == M) begin
        check(cycle - last_out_cycle == M, $sformatf("product %0d: rate", got));
        n_b2b++;
      end
      if (sc.gaps) n_gap++;
      case (sc.kind)
        F_NONE:         n_clean++;
        F_BIT, F_MULTI: if (corrected == exp_corr) n_fixed[sc.p]++;
        F_CHECK:        if (check_err) n_check++;
        F_DOUBLE:       if (uncorrectable) n_unc++;
        default: ;
      endcase
      last_out_cycle = cycle;
      got++;
    end
  end

  // Build one product: random data, reference results, injection masks.
  task automatic add_product(input scen_t sc, output int a [P][N][M], output int u [M]);
    for (int i = 0; i < M; i++) begin
      u[i] = int'($urandom_range(255)) - 128;
      for (int p = 0; p < P; p++)
        for (int r = 0; r < N; r++) a[p][r][i] = int'($urandom_range(255)) - 128;
    end
    for (int p = 0; p < P; p++)
      for (int r = 0; r < N; r++) begin
        longint acc;
        logic [ZW-1:0] m;
        acc = 0;
        for (int i = 0; i < M; i++) acc += longint'(a[p][r][i]) * longint'(u[i]);
        zt.push_back(acc);
        m = '0;
        if ((sc.kind == F_BIT || sc.kind == F_DOUBLE) && p == sc.p && r == (nprod % N))
          m = ZW'(1) << (nprod % ZW);
        if (sc.kind == F_MULTI && p == sc.p && (r % 4) == 1)
          m = ZW'(r * 37 + 5);
        if (sc.kind == F_DOUBLE && p == sc.p2 && r == 3)
          m = ZW'(1) << 7;
        inj_tab.push_back(m);
      end
    for (int j = 0; j < R; j++)
      inj_s_tab.push_back((sc.kind == F_CHECK && j == sc.j) ? SW'(1) << (nprod % SW) : '0);
    scen.push_back(sc);
    nprod++;
  endtask

  task automatic stream(input scen_t sc);
    int a [P][N][M];
    int u [M];
    add_product(sc, a, u);
    for (int i = 0; i < M; i++) begin
      if (sc.gaps && (i % 4) == 2) begin
        in_valid <= 1'b0;
        repeat (1 + i % 3) @(posedge clk);
      end
      in_valid <= 1'b1;
      u_i      <= UW'(u[i]);
      for (int p = 0; p < P; p++)
        for (int r = 0; r < N; r++) a_col[p][r] <= AW'(a[p][r][i]);
      @(posedge clk);
    end
  endtask

  function automatic scen_t mk(fault_e kind, int p, int p2, int j, bit gaps);
    scen_t s;
    s.kind = kind; s.p = p; s.p2 = p2; s.j = j; s.gaps = gaps;
    return s;
  endfunction

  initial begin
    for (int p = 0; p < P; p++) begin
      n_fixed[p] = 0;
      for (int r = 0; r < N; r++) begin
        a_col[p][r] = '0;
        inj_z[p][r] = '0;
      end
    end
    for (int j = 0; j < R; j++) inj_s[j] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int rep = 0; rep < REPS; rep++) begin
      stream(mk(F_NONE, 0, 0, 0, 0));
      for (int p = 0; p < P; p++) begin
        stream(mk(F_BIT, p, 0, 0, 0));
        stream(mk(F_MULTI, p, 0, 0, 0));
      end
      for (int j = 0; j < R; j++) stream(mk(F_CHECK, 0, 0, j, 0));
      stream(mk(F_NONE, 0, 0, 0, 1));

    end
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);

    check(got == nprod, $sformatf("received %0d result sets, expected %0d", got, nprod));
    $display("mechanisms: clean=%0d check_branch=%0d uncorrectable=%0d back_to_back=%0d gaps=%0d",
             n_clean, n_check, n_unc, n_b2b, n_gap);
    for (int p = 0; p < P; p++) begin
      $display("mechanisms: mvm %0d corrected %0d times", p, n_fixed[p]);
      check(n_fixed[p] > 0, $sformatf("MVM %0d never corrected", p));
    end
    check(n_clean > 0, "no clean product");
    check(n_check > 0, "no check-branch fault");
    check(n_b2b > 0, "no back-to-back products");
    check(n_gap > 0, "no product with gaps");
    check(n_unc == 0, "uncorrectable raised with P = 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
