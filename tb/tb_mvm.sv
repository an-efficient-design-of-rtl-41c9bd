// tb_mvm: self-checking testbench of the sequential matrix-vector multiplier.
//
// Runs back-to-back products of random 8-bit signed matrices and vectors at
// the default size (20 x 30), one product of all -128 items (largest result
// magnitude, checks the 21-bit width) and one product fed with gaps in the
// column stream. Each result is compared with a product computed here with
// integer arithmetic. The timing is checked too: out_valid must come one
// cycle after the last column and, back to back, exactly M cycles apart.
module tb_mvm;
  localparam int N  = 20;
  localparam int M  = 30;
  localparam int AW = 8;
  localparam int UW = 8;
  localparam int OW = 21;
  localparam int NPROD = 6;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [AW-1:0] a_col [N];
  logic signed [UW-1:0] u_i = '0;
  logic                 out_valid;
  logic signed [OW-1:0] z [N];

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  int a_mat [NPROD][N][M];
  int u_vec [NPROD][M];
  longint expect_z [NPROD][N];
  int last_col_cycle [NPROD];
  int got = 0;
  int last_out_cycle = -1;

  mvm #(.ROWS(N), .COLS(M), .AW(AW), .UW(UW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    for (int r = 0; r < N; r++) a_col[r] = '0;
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int accepted = 0;

  // Check every result as it appears; note the cycle of each last column.
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      accepted++;
      if (accepted % M == 0) last_col_cycle[accepted / M - 1] = cycle;
    end
    if (rst_n && out_valid) begin
      if (got >= NPROD) begin
        failures++;
        $display("unexpected out_valid");
      end else begin
        for (int r = 0; r < N; r++) begin
          checks++;
          if (longint'(z[r]) != expect_z[got][r]) begin
            failures++;
            $display("product %0d row %0d: got %0d expected %0d", got, r, z[r], expect_z[got][r]);
          end
        end
        checks++;
        if (cycle != last_col_cycle[got] + 1) begin
          failures++;
          $display("product %0d: latency %0d cycles after last column", got, cycle - last_col_cycle[got]);
        end
        if (got >= 1 && got <= 4) begin
          checks++;
          if (cycle - last_out_cycle != M) begin
            failures++;
            $display("product %0d: %0d cycles after previous result, expected %0d", got, cycle - last_out_cycle, M);
          end
        end
        last_out_cycle = cycle;
        got++;
      end
    end
  end

  initial begin
    // Stimulus: products 0..3 random, 4 all -128, 5 random with gaps.
    for (int k = 0; k < NPROD; k++) begin
      for (int i = 0; i < M; i++) begin
        u_vec[k][i] = (k == 4) ? -128 : int'($urandom_range(255)) - 128;
        for (int r = 0; r < N; r++)
          a_mat[k][r][i] = (k == 4) ? -128 : int'($urandom_range(255)) - 128;
      end
      for (int r = 0; r < N; r++) begin
        expect_z[k][r] = 0;
        for (int i = 0; i < M; i++)
          expect_z[k][r] += longint'(a_mat[k][r][i]) * longint'(u_vec[k][i]);
      end
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < NPROD; k++) begin
      for (int i = 0; i < M; i++) begin
        if (k == 5 && (i % 3) == 1) begin
          in_valid <= 1'b0;
          repeat (2) @(posedge clk);
        end
        in_valid <= 1'b1;
        u_i      <= UW'(u_vec[k][i]);
        for (int r = 0; r < N; r++) a_col[r] <= AW'(a_mat[k][r][i]);
        @(posedge clk);
      end
      if (k == 4) begin
        in_valid <= 1'b0;
        repeat (5) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);

    checks++;
    if (got != NPROD) begin
      failures++;
      $display("received %0d results, expected %0d", got, NPROD);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
