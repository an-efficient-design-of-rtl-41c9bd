// all_sum: redundant product of the summed matrix, sum_z = (A_1 + ... + A_P) * u.
//
// Each cycle the P input columns are added item by item, giving one column of
// the sum matrix A (ROWS x COLS), which goes through an mvm unit together with
// u_i. Because multiplication distributes over addition, sum_z equals the sum
// of the P MVM results, so any one MVM result can be rebuilt from sum_z and
// the other P - 1 results.
//
// Interface: the P columns and u_i with in_valid, one column per cycle, in
// step with the MVM units; sum_z and z_valid come out with the latency of an
// mvm unit. Widths are exact: 10-bit items of A and 23-bit results for 8-bit
// items, P = 4 and M = 30.
//
// From the original scheme: the matrix A as the sum of the P matrices and its
// product computed with the same MVM unit. Own choice: the adders that form A
// are combinational, in front of the multipliers.
module all_sum #(
  parameter int P    = 4,
  parameter int ROWS = 20,
  parameter int COLS = 30,
  parameter int AW   = 8,
  parameter int UW   = 8,
  parameter int SAW  = AW + ft_mvm_pkg::sum_bits(P),
  parameter int OW   = SAW + UW + ft_mvm_pkg::sum_bits(COLS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] a_col [P][ROWS],
  input  logic signed [UW-1:0] u_i,
  output logic                 z_valid,
  output logic signed [OW-1:0] sum_z [ROWS]
);

  logic signed [SAW-1:0] a_sum [ROWS];

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      a_sum[r] = '0;
      for (int p = 0; p < P; p++) a_sum[r] += SAW'(a_col[p][r]);
    end
  end

  mvm #(
    .ROWS (ROWS),
    .COLS (COLS),
    .AW   (SAW),
    .UW   (UW),
    .OW   (OW)
  ) u_mvm_a (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a_col     (a_sum),
    .u_i       (u_i),
    .out_valid (z_valid),
    .z         (sum_z)
  );

endmodule
