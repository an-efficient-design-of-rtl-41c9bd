// tb_col_sum: self-checking testbench of the column checksum.
//
// Applies random 20-item columns of 8-bit signed values plus the two extreme
// columns (all -128 and all 127) and compares the 13-bit sum with an integer
// sum computed here.
module tb_col_sum;
  localparam int N  = 20;
  localparam int AW = 8;
  localparam int CW = 13;

  logic signed [AW-1:0] a_col [N];
  logic signed [CW-1:0] c;

  int checks = 0;
  int failures = 0;

  col_sum #(.ROWS(N), .AW(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int ref_sum;
      ref_sum = 0;
      for (int r = 0; r < N; r++) begin
        int v;
        v = (t == 0) ? -128 : (t == 1) ? 127 : int'($urandom_range(255)) - 128;
        a_col[r] = AW'(v);
        ref_sum += v;
      end
      #1;
      checks++;
      if (int'(c) != ref_sum) begin
        failures++;
        $display("test %0d: got %0d expected %0d", t, c, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
