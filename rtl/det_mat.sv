// det_mat: detection-matrix branch, S = D * u.
//
// D has one row per Hamming check row and one column per vector item. Its
// column i is built on the fly from the column checksums c^p_i of the P input
// matrices: D[j][i] is the sum of c^p_i over the MVMs p that check row j
// covers (ft_mvm_pkg::row_covers). For P = 4 each row adds three checksums,
// so the 13-bit checksums give 15-bit items. The columns of D then go through
// an mvm unit together with u_i, so S[j] equals the sum of all result items of
// the MVMs that row j covers, unless one of them failed.
//
// Interface: c and u_i are presented with in_valid, one column per cycle, in
// step with the MVM units; S and s_valid come out with the same latency as an
// mvm unit (one cycle after the last column). Widths are exact: 28-bit S for
// 8-bit items, N = 20, M = 30, P = 4.
//
// From the original scheme: D generated column by column from the column sums
// according to a Hamming code, and D * u computed with the same MVM unit as
// the data. Own choices: the Hamming column of each MVM (ft_mvm_pkg::cover_table) and a
// width of CW + ceil(log2(P)) for the items of D, which is exact for P = 4.
module det_mat #(
  parameter int P    = 4,
  parameter int COLS = 30,
  parameter int CW   = 13,     // column checksum width
  parameter int UW   = 8,
  parameter int R    = ft_mvm_pkg::check_rows(P),
  parameter int DW   = CW + ft_mvm_pkg::sum_bits(P),
  parameter int SW   = DW + UW + ft_mvm_pkg::sum_bits(COLS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [CW-1:0] c   [P],
  input  logic signed [UW-1:0] u_i,
  output logic                 s_valid,
  output logic signed [SW-1:0] s   [R]
);

  localparam logic [ft_mvm_pkg::MAX_COVER-1:0] COVER = ft_mvm_pkg::cover_table(P);

  logic signed [DW-1:0] d_col [R];

  // Column i of the detection matrix.
  always_comb begin
    for (int j = 0; j < R; j++) begin
      d_col[j] = '0;
      for (int p = 0; p < P; p++)
        if (COVER[j*P+p]) d_col[j] += DW'(c[p]);
    end
  end

  mvm #(
    .ROWS (R),
    .COLS (COLS),
    .AW   (DW),
    .UW   (UW),
    .OW   (SW)
  ) u_mvm_d (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a_col     (d_col),
    .u_i       (u_i),
    .out_valid (s_valid),
    .z         (s)
  );

endmodule
