// fp64_pkg: types, constants and helper functions shared by the IEEE 754
// double-precision units and the Lennard-Jones force/potential pipeline.
//
// The pipeline depths of the four floating-point unit types are the ones
// quoted for the original FPGA implementation (adder 17, multiplier 12,
// divider 32, square rooter 47 stages). The numeric constants are the ones
// that appear as inputs in the pipeline's dataflow graph (1.0, 0.5, 4.0,
// 48.0). Denormal numbers are not supported anywhere: an exponent field of
// zero is read as zero, and results that would be denormal are flushed to
// a signed zero. Results too large for the format become infinity.
package fp64_pkg;

  // Pipeline depths (clock cycles from operand to result).
  localparam int unsigned ADD_STAGES  = 17;
  localparam int unsigned MUL_STAGES  = 12;
  localparam int unsigned DIV_STAGES  = 32;
  localparam int unsigned SQRT_STAGES = 47;

  typedef logic [63:0] fp64_t;

  typedef struct packed {
    logic        sign;
    logic [10:0] exp;
    logic [51:0] man;
  } fp64_fields_t;

  localparam fp64_t FP_ZERO     = 64'h0000_0000_0000_0000;
  localparam fp64_t FP_HALF     = 64'h3FE0_0000_0000_0000;
  localparam fp64_t FP_ONE      = 64'h3FF0_0000_0000_0000;
  localparam fp64_t FP_FOUR     = 64'h4010_0000_0000_0000;
  localparam fp64_t FP_FORTYEIGHT = 64'h4048_0000_0000_0000;
  localparam fp64_t FP_POS_INF  = 64'h7FF0_0000_0000_0000;
  localparam fp64_t FP_QNAN     = 64'h7FF8_0000_0000_0000;

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Round to nearest, ties to even, and pack.
  //   sig[54]    hidden bit (must be 1 for a non-zero result)
  //   sig[53:2]  52 fraction bits
  //   sig[1]     round bit
  //   sig[0]     sticky bit (OR of everything below the round bit)
  //   exp        biased exponent belonging to sig, may be out of range
  function automatic fp64_t fp_round_pack(input logic sign,
                                          input logic signed [13:0] exp,
                                          input logic [54:0] sig);
    logic              up;
    logic [53:0]       m;
    logic signed [13:0] e;
    up = sig[1] & (sig[0] | sig[2]);
    m  = {1'b0, sig[54:2]} + 54'(up);
    e  = exp;
    if (m[53]) begin
      m = m >> 1;
      e = e + 14'sd1;
    end
    if (e >= 14'sd2047)   return {sign, 11'h7FF, 52'b0};
    else if (e <= 14'sd0) return {sign, 63'b0};
    else                  return {sign, e[10:0], m[51:0]};
  endfunction

endpackage
