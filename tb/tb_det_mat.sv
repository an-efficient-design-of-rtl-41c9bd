// tb_det_mat: self-checking testbench of the detection-matrix branch.
//
// Feeds random column checksums (13-bit signed, including the extremes) and
// vector items for several back-to-back products with P = 4 and M = 30. The
// expected check values are worked out here from the (7,4) Hamming check
// matrix written out by hand: row 0 covers MVMs 0, 1, 3; row 1 covers 0, 2,
// 3; row 2 covers 1, 2, 3. Also checks that S appears one cycle after the
// last column.
module tb_det_mat;
  localparam int P  = 4;
  localparam int M  = 30;
  localparam int CW = 13;
  localparam int UW = 8;
  localparam int R  = 3;
  localparam int SW = 28;
  localparam int NPROD = 5;
  localparam bit COV [R][P] = '{'{1, 1, 0, 1}, '{1, 0, 1, 1}, '{0, 1, 1, 1}};

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [CW-1:0] c [P];
  logic signed [UW-1:0] u_i = '0;
  logic                 s_valid;
  logic signed [SW-1:0] s [R];

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int accepted = 0;
  int last_col_cycle [NPROD];
  int got = 0;
  int c_val [NPROD][P][M];
  int u_val [NPROD][M];
  longint expect_s [NPROD][R];

  det_mat #(.P(P), .COLS(M), .CW(CW), .UW(UW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    for (int p = 0; p < P; p++) c[p] = '0;
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
    if (rst_n && s_valid) begin
      for (int j = 0; j < R; j++) begin
        checks++;
        if (longint'(s[j]) != expect_s[got][j]) begin
          failures++;
          $display("product %0d row %0d: got %0d expected %0d", got, j, s[j], expect_s[got][j]);
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
          c_val[k][p][i] = (k == 0) ? -4096 : (k == 1) ? 4095 : int'($urandom_range(8191)) - 4096;
      end
      for (int j = 0; j < R; j++) begin
        expect_s[k][j] = 0;
        for (int i = 0; i < M; i++)
          for (int p = 0; p < P; p++)
            if (COV[j][p]) expect_s[k][j] += longint'(c_val[k][p][i]) * longint'(u_val[k][i]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < NPROD; k++)
      for (int i = 0; i < M; i++) begin
        in_valid <= 1'b1;
        u_i      <= UW'(u_val[k][i]);
        for (int p = 0; p < P; p++) c[p] <= CW'(c_val[k][p][i]);
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
