// tb_all_sum: self-checking testbench of the summed-matrix product.
//
// Feeds four random 20 x 30 matrices of 8-bit signed items and a random
// vector (plus one product of all -128 items, the largest magnitude) and
// checks sum_z against (A_1 + A_2 + A_3 + A_4) * u worked out here, and its
// latency of one cycle after the last column.
module tb_all_sum;
  localparam int P  = 4;
  localparam int N  = 20;
  localparam int M  = 30;
  localparam int AW = 8;
  localparam int UW = 8;
  localparam int OW = 23;
  localparam int NPROD = 4;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [AW-1:0] a_col [P][N];
  logic signed [UW-1:0] u_i = '0;
  logic                 z_valid;
  logic signed [OW-1:0] sum_z [N];

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int accepted = 0;
  int last_col_cycle [NPROD];
  int got = 0;
  int a_val [NPROD][P][N][M];
  int u_val [NPROD][M];
  longint expect_z [NPROD][N];

  all_sum #(.P(P), .ROWS(N), .COLS(M), .AW(AW), .UW(UW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    for (int p = 0; p < P; p++)
      for (int r = 0; r < N; r++) a_col[p][r] = '0;
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      accepted++;
      if (accepted % M == 0) last_col_cycle[accepted / M - 1] = cycle;
    end
    if (rst_n && z_valid) begin
      for (int r = 0; r < N; r++) begin
        checks++;
        if (longint'(sum_z[r]) != expect_z[got][r]) begin
          failures++;
          $display("product %0d row %0d: got %0d expected %0d", got, r, sum_z[r], expect_z[got][r]);
        end
      end
      checks++;
      if (cycle != last_col_cycle[got] + 1) begin
        failures++;
        $display("product %0d: wrong latency", got);
      end
      got++;
    end
  end

  initial begin
    for (int k = 0; k < NPROD; k++) begin
      for (int i = 0; i < M; i++) begin
        u_val[k][i] = (k == 0) ? -128 : int'($urandom_range(255)) - 128;
        for (int p = 0; p < P; p++)
          for (int r = 0; r < N; r++)
            a_val[k][p][r][i] = (k == 0) ? -128 : int'($urandom_range(255)) - 128;
      end
      for (int r = 0; r < N; r++) begin
        expect_z[k][r] = 0;
        for (int i = 0; i < M; i++)
          for (int p = 0; p < P; p++)
            expect_z[k][r] += longint'(a_val[k][p][r][i]) * longint'(u_val[k][i]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < NPROD; k++)
      for (int i = 0; i < M; i++) begin
        in_valid <= 1'b1;
        u_i      <= UW'(u_val[k][i]);
        for (int p = 0; p < P; p++)
          for (int r = 0; r < N; r++) a_col[p][r] <= AW'(a_val[k][p][r][i]);
        @(posedge clk);
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
