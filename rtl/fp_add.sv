// fp_add: pipelined IEEE 754 double-precision adder/subtractor.
//
// y = a + b (sub = 0) or y = a - b (sub = 1), STAGES clock cycles after the
// operands are sampled; a new operation can start every cycle and there is
// no stall or enable. The depth of 17 stages and the restriction to normal
// numbers (no denormals, no NaN handling) follow the unit the original
// design used; the internal organisation is this design's own:
//   stage 1   unpack, order the operands by magnitude, align the smaller
//             significand (with guard, round and sticky bits)
//   stage 2   add or subtract, normalise with a leading-zero count, round
//             to nearest (ties to even), pack
//   stages 3..STAGES  output registers; a synthesis tool with register
//             retiming spreads the logic of stages 1-2 over them.
// An exponent field of 0 reads as zero; denormal results flush to zero and
// overflow gives infinity. An exact cancellation gives +0.
module fp_add
  import fp64_pkg::*;
#(
  parameter int unsigned STAGES = ADD_STAGES
) (
  input  logic  clk,
  input  fp64_t a,
  input  fp64_t b,
  input  logic  sub,
  output fp64_t y
);

  // ---------------- stage 1: unpack, swap, align ----------------
  typedef struct packed {
    logic               sign;      // sign of the result
    logic               eff_sub;   // magnitudes are subtracted
    logic               zero;      // both operands zero
    logic signed [13:0] exp;       // exponent of the larger operand
    logic [55:0]        big;       // {hidden, 52 fraction, 3 zero} of larger
    logic [55:0]        sml;     // aligned smaller, sticky in bit 0
  } align_t;

  align_t s1_d, s1_q;

  always_comb begin
    fp64_fields_t fa, fb, fbig, fsml;
    logic         swap;
    logic [10:0]  diff;
    logic [5:0]   sh;
    logic [111:0] wide;

    fa   = a;
    fb   = b;
    fb.sign = fb.sign ^ sub;
    swap = {fb.exp, fb.man} > {fa.exp, fa.man};
    fbig = swap ? fb : fa;
    fsml = swap ? fa : fb;

    diff = fbig.exp - fsml.exp;
    sh   = (diff > 11'd63) ? 6'd63 : diff[5:0];
    wide = {(fsml.exp != 11'd0), fsml.man, 3'b000, 56'b0} >> sh;

    s1_d.sign    = fbig.sign;
    s1_d.eff_sub = fbig.sign ^ fsml.sign;
    s1_d.zero    = (fbig.exp == 11'd0);
    s1_d.exp     = 14'(fbig.exp);
    s1_d.big     = {(fbig.exp != 11'd0), fbig.man, 3'b000};
    s1_d.sml   = {wide[111:57], wide[56] | (|wide[55:0])};
  end

  always_ff @(posedge clk) s1_q <= s1_d;

  // ---------------- stage 2: add, normalise, round ----------------
  fp64_t s2_d, s2_q;

  always_comb begin
    logic [56:0]        sum;
    logic [55:0]        n;
    logic signed [13:0] e;
    int unsigned        lz;

    sum = s1_q.eff_sub ? {1'b0, s1_q.big} - {1'b0, s1_q.sml}
                       : {1'b0, s1_q.big} + {1'b0, s1_q.sml};
    e   = s1_q.exp;
    n   = '0;
    lz  = 0;
    if (sum[56]) begin
      n = {sum[56:2], sum[1] | sum[0]};
      e = e + 14'sd1;
    end else begin
      for (int i = 55; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 55 - i;
          break;
        end
      end
      n = sum[55:0] << lz;
      e = e - 14'(lz);
    end

    if (s1_q.zero || sum == 57'd0) s2_d = FP_ZERO;
    else s2_d = fp_round_pack(s1_q.sign, e, {n[55:2], n[1] | n[0]});
  end

  always_ff @(posedge clk) s2_q <= s2_d;

  // ---------------- remaining stages ----------------
  delay_line #(.WIDTH(64), .DEPTH(STAGES - 2)) u_out (
    .clk(clk), .rst_n(1'b1), .d(s2_q), .q(y)
  );

  initial assert (STAGES >= 2) else $error("fp_add needs STAGES >= 2");

endmodule
