// tb_fp_div: self-checking test of fp_div at its default depth (32).
// Streams one division per cycle over random operands (including
// operands with equal significands and quotients near 1) and compares each
// quotient bit for bit with the simulator's double-precision division
// (round to nearest even), STAGES cycles after the operands; also checks
// x/0 = inf and 0/x = 0.
module tb_fp_div;
  import fp64_pkg::*;

  localparam int N = 3000;
  localparam int LAT = DIV_STAGES;

  logic  clk = 1'b0;
  fp64_t a, b, y;
  fp64_t expv [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_div dut (.clk(clk), .a(a), .b(b), .y(y));

  function automatic fp64_t rnd(int unsigned ebase, int unsigned espan);
    logic [51:0] m;
    logic [10:0] e;
    m = {$urandom(), $urandom()};
    e = 11'(ebase + ($urandom() % espan));
    return {1'($urandom()), e, m};
  endfunction

  initial begin
    a = '0; b = FP_ONE;
    for (int c = 0; c < N + LAT; c++) begin
      @(posedge clk); #1;
      if (c >= LAT) begin
        checks++;
        if (y !== expv[c-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: got %h exp %h", c-LAT, y, expv[c-LAT]);
        end
      end
      if (c < N) begin
        case (c % 5)
          0: begin a = rnd(1000, 40); b = rnd(1000, 40); end
          1: begin a = rnd(1023, 1);  b = {a[63:52] ^ 12'h800, a[51:0]}; end
          2: begin a = rnd(1023, 1);  b = {1'b0, 11'd1023, a[51:0] ^ 52'(1 << ($urandom() % 8))}; end
          3: begin a = FP_ONE;        b = rnd(1000, 50); end
          default: begin a = rnd(600, 800); b = rnd(600, 800); end
        endcase
        if (c == 7)  b = FP_ZERO;
        if (c == 11) a = FP_ZERO;
        expv[c] = $realtobits($bitstoreal(a) / $bitstoreal(b));
        // results outside the normal range are flushed / saturated
        if (expv[c][62:52] == 11'd0) expv[c] = {expv[c][63], 63'd0};
      end
    end
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
