// fp_sqrt: 47-stage IEEE 754 double-precision square rooter.
//
// y = sqrt(a), STAGES (default 47) clock cycles after a is sampled, one
// new operand per cycle, no stall. Rounding is to nearest (ties to even; a
// square root never falls exactly half-way, so adding one at the round
// position and truncating gives that result). Denormal inputs read as zero.
//
// The structure follows the published square rooter:
//   stage 1      prepend the hidden bit and adjust for the exponent parity.
//                With e the unbiased exponent, an even e gives the
//                54-bit radicand 1.m0 and e_s = e/2; an odd e gives 0.1m
//                and e_s = (e+1)/2.
//   stage 2      halve the exponent (a shift of the biased sum).
//   stages 2-44  non-restoring square root of the extended significand,
//                one root bit per step, 55 steps in 43 stages: the cheap
//                early steps are paired (the first 12 stages do two steps
//                each, the other 31 one). Each step adds or subtracts
//                (4Q + 1 or 4Q + 3) depending on the sign of the partial
//                remainder and takes the next two radicand bits.
//   stage 45     normalise: if the root's MSB is 0 shift it left and
//                decrement e_s; keep the 53 bits below the leading one.
//   stage 46     round: add one at the round bit; keep 52 bits and carry.
//   stage 47     output: special value if a flag is set, otherwise
//                {0, e_s + carry, rounded fraction}.
//   stages 1-4   (in parallel) classify the input into a special-case flag:
//                +-0 -> +-0; NaN, negative non-zero or -inf -> NaN;
//                +inf -> +inf; otherwise the computed result.
// The published text appends 56 zero bits to the 54-bit radicand; here the
// 110-bit operand is {0, radicand, 55 zeros}, which puts the binary point
// where the 55-bit root then has the same point as 1.m0 / 0.1m (root bit 54
// is the units bit). The split of the 55 steps into 43 stages and the
// 4-stage flag logic are this design's choices. STAGES sets the depth: the
// 55 root steps are spread over STAGES - 4 stages, so a shallower unit
// combines more steps per stage (lower latency, lower clock rate); beyond
// 59 stages (one step per stage) the extra stages are plain registers. The
// stage numbers above are those of the default depth.
module fp_sqrt
  import fp64_pkg::*;
#(
  parameter int unsigned STAGES = SQRT_STAGES   // at least 5
) (
  input  logic  clk,
  input  fp64_t a,
  output fp64_t y
);

  localparam int unsigned NR     = 55;               // root bits
  localparam int unsigned NROOT  = STAGES - 4;       // root stages (43)
  localparam int unsigned NRS    = (NROOT > NR) ? NR : NROOT;  // with logic
  localparam int unsigned PAD    = NROOT - NRS;      // plain registers after
  localparam int unsigned PER    = NR / NRS;
  localparam int unsigned EXTRA  = NR % NRS;
  localparam int unsigned NFLAG  = 4;                // stages to classify
  localparam int unsigned RW     = 60;               // partial remainder width

  typedef enum logic [2:0] {
    SQ_NORMAL, SQ_POS_ZERO, SQ_NEG_ZERO, SQ_NAN, SQ_POS_INF
  } sq_kind_t;

  typedef struct packed {
    logic [53:0]          rad;   // 54-bit adjusted significand
    logic signed [RW-1:0] r;     // partial remainder
    logic [NR-1:0]        q;     // root bits so far (right-aligned)
  } root_t;

  function automatic int unsigned first_step(int unsigned j);
    return j * PER + ((j < EXTRA) ? j : EXTRA);
  endfunction

  // Radicand bit pair used in step i: bits (109-2i, 108-2i) of {0, rad, 55'b0}.
  function automatic logic [1:0] rad_pair(logic [53:0] rad, int unsigned i);
    logic [109:0] x;
    x = {1'b0, rad, 55'b0};
    return x[109-2*i -: 2];
  endfunction

  // ---------------- stage 1: adjust exponent ----------------
  fp64_fields_t fa;
  assign fa = a;

  root_t       rs [NRS + 1];
  logic [10:0] e1;
  logic        odd1;

  always_ff @(posedge clk) begin
    // unbiased e even <=> biased exponent odd
    odd1      <= ~fa.exp[0];
    e1        <= fa.exp;
    rs[0].rad <= fa.exp[0] ? {1'b1, fa.man, 1'b0} : {2'b01, fa.man};
    rs[0].r   <= '0;
    rs[0].q   <= '0;
  end

  // ---------------- stage 2: halve exponent ----------------
  // biased e_s = (E + 1023) / 2 for odd E, (E + 1024) / 2 for even E
  logic [11:0] es2;
  always_ff @(posedge clk) es2 <= (12'(e1) + 12'd1023 + 12'(odd1)) >> 1;

  // carry e_s alongside the root until normalisation (stage 45)
  logic [11:0] es44;
  delay_line #(.WIDTH(12), .DEPTH(NROOT - 1)) u_es (
    .clk(clk), .rst_n(1'b1), .d(es2), .q(es44)
  );

  // ---------------- stages 2..44: non-restoring root ----------------
  for (genvar j = 0; j < int'(NRS); j++) begin : g_root
    localparam int unsigned FIRST = first_step(j);
    localparam int unsigned COUNT = PER + ((j < EXTRA) ? 1 : 0);
    root_t nxt;
    always_comb begin
      logic signed [RW-1:0] t;
      nxt = rs[j];
      for (int unsigned k = 0; k < COUNT; k++) begin
        t = (nxt.r <<< 2) | RW'(rad_pair(nxt.rad, FIRST + k));
        if (nxt.r >= 0) nxt.r = t - RW'({nxt.q, 2'b01});
        else            nxt.r = t + RW'({nxt.q, 2'b11});
        nxt.q = {nxt.q[NR-2:0], (nxt.r >= 0)};
      end
    end
    always_ff @(posedge clk) rs[j+1] <= nxt;
  end

  // a unit deeper than one step per stage pads the root with registers
  logic [NR-1:0] root44;
  delay_line #(.WIDTH(NR), .DEPTH(PAD)) u_pad (
    .clk(clk), .rst_n(1'b1), .d(rs[NRS].q), .q(root44)
  );

  // ---------------- stages 1-4: special-case flags ----------------
  logic     f1_sign, f1_eall, f1_ezero, f1_mzero;
  logic     f2_sign, f2_zero, f2_inf, f2_nan;
  logic     f3_sign, f3_zero, f3_inf, f3_nan;
  sq_kind_t f4_kind, f46_kind;

  always_ff @(posedge clk) begin
    f1_sign  <= fa.sign;
    f1_eall  <= &fa.exp;
    f1_ezero <= ~|fa.exp;
    f1_mzero <= ~|fa.man;

    f2_sign  <= f1_sign;
    f2_zero  <= f1_ezero;
    f2_inf   <= f1_eall & f1_mzero;
    f2_nan   <= f1_eall & ~f1_mzero;

    f3_sign  <= f2_sign;
    f3_zero  <= f2_zero;
    f3_inf   <= f2_inf & ~f2_sign;
    f3_nan   <= f2_nan | (f2_sign & ~f2_zero);

    if (f3_zero)     f4_kind <= f3_sign ? SQ_NEG_ZERO : SQ_POS_ZERO;
    else if (f3_nan) f4_kind <= SQ_NAN;
    else if (f3_inf) f4_kind <= SQ_POS_INF;
    else             f4_kind <= SQ_NORMAL;
  end

  logic [2:0] f46_bits;
  delay_line #(.WIDTH(3), .DEPTH(STAGES - 1 - NFLAG)) u_flag (
    .clk(clk), .rst_n(1'b1), .d(f4_kind), .q(f46_bits)
  );
  assign f46_kind = sq_kind_t'(f46_bits);

  // ---------------- stage 45: normalise ----------------
  logic [52:0] n45;
  logic [11:0] es45;
  always_ff @(posedge clk) begin
    if (root44[NR-1]) begin
      n45  <= root44[NR-2:1];
      es45 <= es44;
    end else begin
      n45  <= root44[NR-3:0];
      es45 <= es44 - 12'd1;
    end
  end

  // ---------------- stage 46: round ----------------
  logic [51:0] m46;
  logic        c46;
  logic [11:0] es46;
  always_ff @(posedge clk) begin
    logic [53:0] sum;
    sum  = {1'b0, n45} + 54'd1;
    c46  <= sum[53];
    m46  <= sum[52:1];
    es46 <= es45;
  end

  // ---------------- stage 47: output ----------------
  always_ff @(posedge clk) begin
    logic [11:0] ef;
    case (f46_kind)
      SQ_POS_ZERO: y <= 64'h0000_0000_0000_0000;
      SQ_NEG_ZERO: y <= 64'h8000_0000_0000_0000;
      SQ_NAN:      y <= FP_QNAN;
      SQ_POS_INF:  y <= FP_POS_INF;
      default: begin
        ef = es46 + 12'(c46);
        y  <= {1'b0, ef[10:0], c46 ? {1'b0, m46[51:1]} : m46};
      end
    endcase
  end

  initial assert (STAGES >= 5) else $error("fp_sqrt needs STAGES >= 5");

endmodule
