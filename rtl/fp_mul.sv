// fp_mul: pipelined IEEE 754 double-precision multiplier.
//
// y = a * b, STAGES clock cycles after the operands are sampled, one new
// product per cycle, no stall. As in the unit the original design used, the
// product is rounded by truncation (towards zero) and only normal numbers
// are handled: an exponent field of 0 reads as zero, denormal results flush
// to zero and overflow gives infinity; NaN is not handled. The organisation
// inside is this design's own:
//   stage 1   53 x 53-bit significand product, exponent sum, sign
//   stage 2   normalise (product in [1,4)), truncate, pack
//   stages 3..STAGES  output registers, for retiming the product logic
//             (on an FPGA the product maps onto embedded multipliers).
module fp_mul
  import fp64_pkg::*;
#(
  parameter int unsigned STAGES = MUL_STAGES
) (
  input  logic  clk,
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  typedef struct packed {
    logic               sign;
    logic               zero;
    logic signed [13:0] exp;
    logic [105:0]       prod;
  } prod_t;

  prod_t s1_d, s1_q;

  always_comb begin
    fp64_fields_t fa, fb;
    fa = a;
    fb = b;
    s1_d.sign = fa.sign ^ fb.sign;
    s1_d.zero = (fa.exp == 11'd0) || (fb.exp == 11'd0);
    s1_d.exp  = 14'(fa.exp) + 14'(fb.exp) - 14'sd1023;
    s1_d.prod = {53'b0, 1'b1, fa.man} * {53'b0, 1'b1, fb.man};
  end

  always_ff @(posedge clk) s1_q <= s1_d;

  fp64_t s2_d, s2_q;

  always_comb begin
    logic [51:0]        m;
    logic signed [13:0] e;
    if (s1_q.prod[105]) begin
      m = s1_q.prod[104:53];
      e = s1_q.exp + 14'sd1;
    end else begin
      m = s1_q.prod[103:52];
      e = s1_q.exp;
    end
    if (s1_q.zero || e <= 14'sd0) s2_d = {s1_q.sign, 63'b0};
    else if (e >= 14'sd2047)      s2_d = {s1_q.sign, 11'h7FF, 52'b0};
    else                          s2_d = {s1_q.sign, e[10:0], m};
  end

  always_ff @(posedge clk) s2_q <= s2_d;

  delay_line #(.WIDTH(64), .DEPTH(STAGES - 2)) u_out (
    .clk(clk), .rst_n(1'b1), .d(s2_q), .q(y)
  );

  initial assert (STAGES >= 2) else $error("fp_mul needs STAGES >= 2");

endmodule
