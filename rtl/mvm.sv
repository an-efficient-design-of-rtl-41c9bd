// mvm: sequential matrix-vector multiplier, z = A * u, for an N x M matrix A
// (ROWS x COLS) and an M x 1 vector u.
//
// How it works: one column of A and the matching vector item u_i arrive per
// cycle (in_valid high). ROWS multipliers form a_col[r] * u_i in parallel and
// ROWS adders add the products to ROWS accumulator registers. A column counter
// steers the selector in front of each adder: for the first column of a
// vector the accumulator is not fed back (a fresh sum starts), for the others
// it is (the sum goes on). When the counter reaches the last column the
// finished sums are loaded into the output registers z and out_valid pulses
// for one cycle. Columns of the next product may follow with no gap, so a new
// N x 1 result appears every COLS cycles.
//
// Timing: out_valid rises in the cycle after the COLS-th accepted column; z
// holds its value until the next result. Columns may arrive with gaps
// (in_valid low), the counter only advances on accepted columns.
//
// From the original scheme: the N multipliers, N adders, N accumulator registers,
// the cycle counter and its selectors, one result every M cycles, and exact
// widths (8-bit items, M = 30 give 21-bit results). Own choices: the result is
// held in a separate output register so accumulation of the next vector can
// start at once; synchronous active-low reset; in_valid as the input strobe.
module mvm #(
  parameter int ROWS = 20,                    // N
  parameter int COLS = 30,                    // M
  parameter int AW   = 8,                     // matrix item width
  parameter int UW   = 8,                     // vector item width
  parameter int OW   = AW + UW + ft_mvm_pkg::sum_bits(COLS)  // result width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] a_col [ROWS],
  input  logic signed [UW-1:0] u_i,
  output logic                 out_valid,
  output logic signed [OW-1:0] z     [ROWS]
);

  localparam int CW = (COLS > 1) ? $clog2(COLS) : 1;

  logic [CW-1:0]         cnt;
  logic                  first_col, last_col;
  logic signed [OW-1:0]  acc  [ROWS];
  logic signed [OW-1:0]  sum  [ROWS];

  assign first_col = (cnt == '0);
  assign last_col  = (cnt == CW'(COLS - 1));

  // Multiply, select the feedback and add.
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      logic signed [AW+UW-1:0] prod;
      prod   = a_col[r] * u_i;
      sum[r] = (first_col ? OW'(0) : acc[r]) + OW'(prod);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int r = 0; r < ROWS; r++) begin
        acc[r] <= '0;
        z[r]   <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int r = 0; r < ROWS; r++) acc[r] <= sum[r];
        if (last_col) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          for (int r = 0; r < ROWS; r++) z[r] <= sum[r];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
