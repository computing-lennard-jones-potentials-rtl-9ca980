// tb_fp_sqrt: self-checking test of the 47-stage square rooter.
// Streams one operand per cycle (both exponent parities, significands near
// 1 and near 2, perfect squares, large and small magnitudes, and the
// special inputs +-0, +inf, -inf, NaN, negative numbers) and compares each
// result bit for bit with $sqrt (round to nearest), 47 cycles after its
// operand. Special inputs must give +-0, +inf or NaN; their counts are
// checked so each special-case path is exercised. A second, shallower
// instance (20 stages, several root steps combined per stage) must give
// the same results 20 cycles after each operand.
module tb_fp_sqrt;
  import fp64_pkg::*;

  localparam int N = 3000;
  localparam int LAT = SQRT_STAGES;

  logic  clk = 1'b0;
  fp64_t a, y;
  fp64_t expv [N];
  int checks = 0, failures = 0;
  int n_zero = 0, n_nan = 0, n_inf = 0;

  always #5 clk = ~clk;

  fp_sqrt dut (.clk(clk), .a(a), .y(y));

  localparam int LAT20 = 20;
  fp64_t y20;
  fp_sqrt #(.STAGES(LAT20)) dut20 (.clk(clk), .a(a), .y(y20));

  initial begin
    a = '0;
    for (int c = 0; c < N + LAT; c++) begin
      @(posedge clk); #1;
      if (c >= LAT) begin
        checks++;
        if (y !== expv[c-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: got %h exp %h", c-LAT, y, expv[c-LAT]);
        end
      end
      if (c >= LAT20 && c - LAT20 < N) begin
        checks++;
        if (y20 !== expv[c-LAT20]) begin
          failures++;
          if (failures < 10) $display("FAIL 20-stage %0d: got %h exp %h", c-LAT20, y20, expv[c-LAT20]);
        end
      end
      if (c < N) begin
        case (c % 8)
          0: a = {1'b0, 11'(1 + $urandom() % 2045), $urandom(), 20'($urandom())};
          1: a = {1'b0, 11'(1000 + $urandom() % 48), 52'hF_FFFF_FFFF_FFFF - 52'($urandom() % 16)};
          2: a = {1'b0, 11'(1000 + $urandom() % 48), 52'($urandom() % 16)};
          3: a = $realtobits($itor(($urandom() % 100000) + 1) ** 2);
          4: a = {1'b0, 11'(1018 + $urandom() % 10), $urandom(), 20'($urandom())};
          5: a = {1'b1, 11'(1 + $urandom() % 2045), $urandom(), 20'($urandom())};
          6: begin
            case ((c / 8) % 5)
              0: a = 64'h0000_0000_0000_0000;
              1: a = 64'h8000_0000_0000_0000;
              2: a = FP_POS_INF;
              3: a = 64'hFFF0_0000_0000_0000;
              default: a = 64'h7FF0_0000_0000_1234;
            endcase
          end
          default: a = {1'b0, 11'd2046, $urandom(), 20'($urandom())};
        endcase
        if (a[62:52] == 11'h7FF && a[51:0] != 0) begin expv[c] = FP_QNAN; n_nan++; end
        else if (a[62:52] == 0) begin expv[c] = {a[63], 63'd0}; n_zero++; end
        else if (a[63])                         begin expv[c] = FP_QNAN; n_nan++; end
        else if (a == FP_POS_INF)               begin expv[c] = FP_POS_INF; n_inf++; end
        else expv[c] = $realtobits($sqrt($bitstoreal(a)));
      end
    end
    checks++;
    if (n_zero == 0 || n_nan == 0 || n_inf == 0) failures++;
    $display("special inputs: zero=%0d nan=%0d inf=%0d", n_zero, n_nan, n_inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + LAT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
