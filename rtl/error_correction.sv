// error_correction: locates a failed MVM and rebuilds its result.
//
// Detection: for every MVM p the items of its result z[p] are added (row sum
// T_p). For check row j the row sums of the MVMs that row covers are added
// and compared with the check value s[j] of the detection branch; a mismatch
// sets syndrome bit j. A syndrome equal to the Hamming column h(p) of MVM p
// marks MVM p as failed (corrected[p]). A syndrome with one bit set points at
// the detection branch itself (check_err): the data results are passed on.
// Any other non-zero syndrome cannot be decoded (uncorrectable): the data
// results are passed on unchanged and the flag is raised.
//
// Correction, per result row i: sum_z[i] minus z[q][i] of every MVM q, where
// the selector in front of each subtractor puts 0 in place of the failed
// MVM's value. What is left is the failed MVM's correct item. An output
// selector per MVM and row then passes either z[p][i] or this rebuilt value.
//
// Timing: purely combinational. All inputs must belong to the same product;
// in the full design they are the held output registers of the MVM units, so
// y and the flags are valid for as long as those registers hold a result.
//
// From the original scheme: the unclocked correction stage, the row-sum
// comparison with the Hamming-coded check values, the chain of subtractors
// fed through zero selectors and the output selectors. Own choices: the
// check-branch and uncorrectable flags and the syndrome encoding from
// ft_mvm_pkg.
module error_correction #(
  parameter int P    = 4,
  parameter int ROWS = 20,
  parameter int ZW   = 21,     // MVM result width
  parameter int SW   = 28,     // check value width
  parameter int YW   = 23,     // width of the summed-matrix result
  parameter int R    = ft_mvm_pkg::check_rows(P)
) (
  input  logic signed [ZW-1:0] z     [P][ROWS],
  input  logic signed [SW-1:0] s     [R],
  input  logic signed [YW-1:0] sum_z [ROWS],
  output logic signed [ZW-1:0] y     [P][ROWS],
  output logic [R-1:0]         syndrome,
  output logic [P-1:0]         corrected,
  output logic                 check_err,
  output logic                 uncorrectable
);

  localparam int TW   = ZW + ft_mvm_pkg::sum_bits(ROWS);
  localparam int EW   = TW + ft_mvm_pkg::sum_bits(P);
  localparam int CMPW = ((EW > SW) ? EW : SW) + 1;
  localparam int RW   = ((YW > ZW) ? YW : ZW) + ft_mvm_pkg::sum_bits(P) + 1;

  localparam logic [ft_mvm_pkg::MAX_COVER-1:0] COVER = ft_mvm_pkg::cover_table(P);

  logic signed [TW-1:0]   row_tot [P];
  logic signed [CMPW-1:0] expect_s [R];
  logic [R-1:0]           syn;
  logic [P-1:0]           fail;
  logic                   syn_one_hot;
  logic signed [RW-1:0]   rebuilt [ROWS];

  // Row sums of each MVM result and the syndrome.
  always_comb begin
    for (int p = 0; p < P; p++) begin
      row_tot[p] = '0;
      for (int r = 0; r < ROWS; r++) row_tot[p] += TW'(z[p][r]);
    end
    for (int j = 0; j < R; j++) begin
      expect_s[j] = '0;
      for (int p = 0; p < P; p++)
        if (COVER[j*P+p]) expect_s[j] += CMPW'(row_tot[p]);
      syn[j] = (expect_s[j] != CMPW'(s[j]));
    end
  end

  // Syndrome decoding.
  always_comb begin
    for (int p = 0; p < P; p++) begin
      fail[p] = 1'b1;
      for (int j = 0; j < R; j++)
        if (syn[j] != COVER[j*P+p]) fail[p] = 1'b0;
    end
    syn_one_hot = (syn != '0) && ((syn & (syn - 1'b1)) == '0);
  end

  // Subtractor chain with zero selectors, then output selectors.
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      rebuilt[r] = RW'(sum_z[r]);
      for (int p = 0; p < P; p++)
        rebuilt[r] -= fail[p] ? RW'(0) : RW'(z[p][r]);
      for (int p = 0; p < P; p++)
        y[p][r] = fail[p] ? ZW'(rebuilt[r]) : z[p][r];
    end
  end

  assign syndrome      = syn;
  assign corrected     = fail;
  assign check_err     = syn_one_hot;
  assign uncorrectable = (syn != '0) && !syn_one_hot && (fail == '0);

endmodule
