// ft_pmvm: P parallel matrix-vector multiplications z_p = A_p * u that share
// one input vector, protected together against a failure of any one of them.
//
// Structure:
//   * P mvm units compute the data results z_p (N x 1 each).
//   * Detection branch: a col_sum unit per MVM forms the column checksums
//     c^p_i, det_mat combines them by a Hamming code into the detection
//     matrix D (R x M) and computes the check values S = D * u.
//   * all_sum computes sum_z = (A_1 + ... + A_P) * u.
//   * error_correction compares S with the row sums of the z_p, locates a
//     failed MVM from the syndrome, and rebuilds its result as sum_z minus
//     the other results.
// Protecting P MVMs this way costs R + 1 extra MVM units in total (one of
// N rows, R of only R rows) instead of protecting every MVM on its own.
//
// Interface: one column of each of the P matrices (a_col[p][0..N-1]) and the
// matching vector item u_i per cycle, with in_valid. After M accepted columns
// the P corrected results appear on y with out_valid high for one cycle,
// the cycle after the last column: the MVM units register their results and
// the correction stage behind them is combinational. y and the flags then
// hold until the next result. Products may follow back to back: one set of
// results every M cycles. syndrome, corrected (one bit per MVM), check_err
// and uncorrectable describe the product on y.
//
// inj_z and inj_s are a soft-error model for testing: they are XORed into the
// MVM results and into the check values. Tie them to zero in normal use.
//
// From the original scheme: the block diagram (P MVMs, Col_sum, Det Mat, All Sum,
// Error Correction), P = 4, N = 20, M = 30, 8-bit signed items and exact
// widths. Own choices: the input strobe and reset, the Hamming column given
// to each MVM, the status flags and the injection inputs.
module ft_pmvm #(
  parameter  int P  = 4,       // parallel MVMs
  parameter  int N  = 20,      // matrix rows
  parameter  int M  = 30,      // matrix columns = vector length
  parameter  int AW = 8,       // matrix item width
  parameter  int UW = 8,       // vector item width
  localparam int R  = ft_mvm_pkg::check_rows(P),
  localparam int ZW = AW + UW + ft_mvm_pkg::sum_bits(M),
  localparam int CW = AW + ft_mvm_pkg::sum_bits(N),
  localparam int DW = CW + ft_mvm_pkg::sum_bits(P),
  localparam int SW = DW + UW + ft_mvm_pkg::sum_bits(M),
  localparam int YW = AW + ft_mvm_pkg::sum_bits(P) + UW + ft_mvm_pkg::sum_bits(M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] a_col [P][N],
  input  logic signed [UW-1:0] u_i,
  input  logic        [ZW-1:0] inj_z [P][N],
  input  logic        [SW-1:0] inj_s [R],
  output logic                 out_valid,
  output logic signed [ZW-1:0] y     [P][N],
  output logic        [R-1:0]  syndrome,
  output logic        [P-1:0]  corrected,
  output logic                 check_err,
  output logic                 uncorrectable
);

  logic signed [ZW-1:0] z_raw [P][N];
  logic signed [ZW-1:0] z     [P][N];
  logic [P-1:0]         z_valid;
  logic signed [CW-1:0] c     [P];
  logic signed [SW-1:0] s_raw [R];
  logic signed [SW-1:0] s     [R];
  logic                 s_valid;
  logic signed [YW-1:0] sum_z [N];
  logic                 sum_valid;

  // Data MVMs and column checksums.
  for (genvar p = 0; p < P; p++) begin : g_mvm
    mvm #(
      .ROWS (N),
      .COLS (M),
      .AW   (AW),
      .UW   (UW),
      .OW   (ZW)
    ) u_mvm (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .a_col     (a_col[p]),
      .u_i       (u_i),
      .out_valid (z_valid[p]),
      .z         (z_raw[p])
    );

    col_sum #(
      .ROWS (N),
      .AW   (AW),
      .CW   (CW)
    ) u_col_sum (
      .a_col (a_col[p]),
      .c     (c[p])
    );

    for (genvar r = 0; r < N; r++) begin : g_inj
      assign z[p][r] = z_raw[p][r] ^ inj_z[p][r];
    end
  end

  det_mat #(
    .P    (P),
    .COLS (M),
    .CW   (CW),
    .UW   (UW),
    .R    (R),
    .DW   (DW),
    .SW   (SW)
  ) u_det_mat (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .c        (c),
    .u_i      (u_i),
    .s_valid  (s_valid),
    .s        (s_raw)
  );

  for (genvar j = 0; j < R; j++) begin : g_inj_s
    assign s[j] = s_raw[j] ^ inj_s[j];
  end

  all_sum #(
    .P    (P),
    .ROWS (N),
    .COLS (M),
    .AW   (AW),
    .UW   (UW),
    .SAW  (AW + ft_mvm_pkg::sum_bits(P)),
    .OW   (YW)
  ) u_all_sum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a_col    (a_col),
    .u_i      (u_i),
    .z_valid  (sum_valid),
    .sum_z    (sum_z)
  );

  error_correction #(
    .P    (P),
    .ROWS (N),
    .ZW   (ZW),
    .SW   (SW),
    .YW   (YW),
    .R    (R)
  ) u_error_correction (
    .z             (z),
    .s             (s),
    .sum_z         (sum_z),
    .y             (y),
    .syndrome      (syndrome),
    .corrected     (corrected),
    .check_err     (check_err),
    .uncorrectable (uncorrectable)
  );

  assign out_valid = z_valid[0];

  // All branches see the same column stream and share one latency.
  a_branches_in_step: assert property (
    @(posedge clk) disable iff (!rst_n)
    z_valid[0] |-> (z_valid == '1 && s_valid && sum_valid)
  ) else $error("ft_pmvm: branches out of step");

endmodule
