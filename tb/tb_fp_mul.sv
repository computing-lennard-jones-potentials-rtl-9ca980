// tb_fp_mul: self-checking test of fp_mul at its default depth (12).
// The reference is the exact 106-bit product of the significands,
// truncated to 52 fraction bits (the unit rounds towards zero); it is also
// required to lie within one unit in the last place of the simulator's own
// rounded product. Results are checked STAGES cycles after their operands.
module tb_fp_mul;
  import fp64_pkg::*;

  localparam int N = 3000;
  localparam int LAT = MUL_STAGES;

  logic  clk = 1'b0;
  fp64_t a, b, y;
  fp64_t expv [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_mul dut (.clk(clk), .a(a), .b(b), .y(y));

  function automatic fp64_t rnd(int unsigned ebase, int unsigned espan);
    logic [51:0] m;
    logic [10:0] e;
    m = {$urandom(), $urandom()};
    e = 11'(ebase + ($urandom() % espan));
    return {1'($urandom()), e, m};
  endfunction

  // truncated product, independent of the unit's structure
  function automatic fp64_t ref_mul(fp64_t x, fp64_t z);
    logic [105:0] p;
    longint       e;
    logic [51:0]  m;
    if (x[62:52] == 0 || z[62:52] == 0) return {x[63] ^ z[63], 63'd0};
    p = 106'({1'b1, x[51:0]}) * 106'({1'b1, z[51:0]});
    e = longint'(x[62:52]) + longint'(z[62:52]) - 1023;
    if (p[105]) begin m = p[104:53]; e = e + 1; end
    else m = p[103:52];
    return {x[63] ^ z[63], e[10:0], m};
  endfunction

  initial begin
    real rr, rd;
    a = '0; b = '0;
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
        a = rnd(900, 240);
        b = rnd(900, 240);
        if (c % 50 == 3) b = FP_ZERO;
        if (c % 7 == 1)  b = FP_FORTYEIGHT;
        expv[c] = ref_mul(a, b);
        rr = $bitstoreal(a) * $bitstoreal(b);
        rd = $bitstoreal(expv[c]);
        checks++;
        if ((rr - rd) * (rr - rd) > (rr * 2.3e-16) * (rr * 2.3e-16)) begin
          failures++;
          $display("FAIL reference %h vs %h", $realtobits(rr), expv[c]);
        end
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
