// col_sum: column checksum of one input matrix column, c = sum of a_col[r]
// over its ROWS items.
//
// It feeds the detection branch: summing each column of a matrix A_p gives
// the column-checksum row vector c^p, and c^p * u equals the sum of all items
// of A_p * u, the self-checking property of an MVM. One column is summed per
// cycle, in step with the MVM units.
//
// Timing: purely combinational, so c belongs to the column presented in the
// same cycle. Width: AW + ceil(log2(ROWS)) bits, exact (13 bits for 8-bit
// items and 20 rows, as in the design). The adder is written as a plain
// sum; the structure of the adder tree is left to synthesis (own choice).
module col_sum #(
  parameter int ROWS = 20,
  parameter int AW   = 8,
  parameter int CW   = AW + ft_mvm_pkg::sum_bits(ROWS)
) (
  input  logic signed [AW-1:0] a_col [ROWS],
  output logic signed [CW-1:0] c
);

  always_comb begin
    c = '0;
    for (int r = 0; r < ROWS; r++) c += CW'(a_col[r]);
  end

endmodule
