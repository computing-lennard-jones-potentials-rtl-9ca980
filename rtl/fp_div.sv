// fp_div: pipelined IEEE 754 double-precision divider.
//
// y = a / b, STAGES clock cycles after the operands are sampled, one new
// quotient per cycle, no stall. The depth of 32 stages and the lack of
// denormal support follow the divider the original design used; how it
// works inside is this design's own choice, a radix-2 restoring
// digit recurrence unrolled over the pipeline:
//   stage 1             unpack; remainder = significand of a
//   stages 2..STAGES-1  NQ = 55 quotient bits (1 + 52 + guard + round),
//                       spread as evenly as possible over the stages
//                       (2 bits per stage at the default depth); each bit
//                       is one compare-and-subtract of the divisor
//   stage STAGES        normalise (quotient in (1/2, 2)), sticky from the
//                       final remainder, round to nearest even, pack.
// Special cases: a = 0 gives a signed zero, b = 0 or a = infinity gives a
// signed infinity (a = b = 0 gives NaN). Denormal inputs read as zero;
// denormal results flush to zero.
module fp_div
  import fp64_pkg::*;
#(
  parameter int unsigned STAGES = DIV_STAGES
) (
  input  logic  clk,
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  localparam int unsigned NQ      = 55;
  localparam int unsigned NSTEP   = STAGES - 2;       // recurrence stages
  localparam int unsigned PER     = NQ / NSTEP;       // bits per stage ...
  localparam int unsigned EXTRA   = NQ % NSTEP;       // ... plus one for the first EXTRA

  typedef enum logic [1:0] {DV_NORMAL, DV_ZERO, DV_INF, DV_NAN} dv_kind_t;

  typedef struct packed {
    logic               sign;
    dv_kind_t           kind;
    logic signed [13:0] exp;
    logic [54:0]        rem;
    logic [52:0]        dvs;
    logic [NQ-1:0]      q;
  } dv_t;

  // first quotient bit handled by recurrence stage j
  function automatic int unsigned first_bit(int unsigned j);
    return j * PER + ((j < EXTRA) ? j : EXTRA);
  endfunction

  dv_t st [NSTEP + 1];

  // ---------------- stage 1: unpack ----------------
  always_ff @(posedge clk) begin
    fp64_fields_t fa, fb;
    fa = a;
    fb = b;
    st[0].sign <= fa.sign ^ fb.sign;
    st[0].exp  <= 14'(fa.exp) - 14'(fb.exp) + 14'sd1023;
    st[0].rem  <= {2'b0, (fa.exp != 11'd0), fa.man};
    st[0].dvs  <= {1'b1, fb.man};
    st[0].q    <= '0;
    if (fa.exp == 11'd0 && fb.exp == 11'd0)  st[0].kind <= DV_NAN;
    else if (fa.exp == 11'd0)                st[0].kind <= DV_ZERO;
    else if (fb.exp == 11'd0 || fa.exp == 11'h7FF) st[0].kind <= DV_INF;
    else                                     st[0].kind <= DV_NORMAL;
  end

  // ---------------- stages 2..STAGES-1: quotient digits ----------------
  for (genvar j = 0; j < int'(NSTEP); j++) begin : g_step
    localparam int unsigned FIRST = first_bit(j);
    localparam int unsigned COUNT = PER + ((j < EXTRA) ? 1 : 0);
    dv_t nxt;
    always_comb begin
      nxt = st[j];
      for (int unsigned k = 0; k < COUNT; k++) begin
        if (nxt.rem >= {2'b0, nxt.dvs}) begin
          nxt.rem = nxt.rem - {2'b0, nxt.dvs};
          nxt.q[NQ-1-(FIRST+k)] = 1'b1;
        end
        nxt.rem = nxt.rem << 1;
      end
    end
    always_ff @(posedge clk) st[j+1] <= nxt;
  end

  // ---------------- stage STAGES: normalise, round ----------------
  always_ff @(posedge clk) begin
    dv_t         f;
    logic        sticky;
    f      = st[NSTEP];
    sticky = (f.rem != '0);
    case (f.kind)
      DV_ZERO: y <= {f.sign, 63'b0};
      DV_INF:  y <= {f.sign, 11'h7FF, 52'b0};
      DV_NAN:  y <= FP_QNAN;
      default: begin
        if (f.q[NQ-1]) y <= fp_round_pack(f.sign, f.exp, {f.q[54:1], f.q[0] | sticky});
        else           y <= fp_round_pack(f.sign, f.exp - 14'sd1, {f.q[53:0], sticky});
      end
    endcase
  end

  initial assert (STAGES >= 3 && STAGES - 2 <= NQ)
    else $error("fp_div needs 3 <= STAGES <= %0d", NQ + 2);

endmodule
