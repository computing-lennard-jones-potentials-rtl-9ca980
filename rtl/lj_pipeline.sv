// lj_pipeline: one Lennard-Jones force and potential pipeline.
//
// From the squared pair distance r2 = r^2 (normalised units) it computes,
// in IEEE 754 double precision,
//   F = 48 (1/r^2)(1/r^6)(1/r^6 - 0.5) + dUc / r
//   u = 4 (1/r^6)(1/r^6 - 1) + (dUc*rc - Uc) - dUc * r
// F is the scalar force factor (the host multiplies it by the vector r_ij)
// and u the shifted pair potential. The dataflow graph is the published
// one: 16 operations (2 divisions, 1 square root, 8 multiplications and
// 5 additions/subtractions) in seven levels:
//   1  x = 1/r2,  r = sqrt(r2)
//   2  dUc*r,  dUc/r,  48x,  x*x
//   3  x6 = (x*x)*x
//   4  48x*x6,  x6 - 0.5,  4*x6,  x6 - 1
//   5  (48x*x6)(x6 - 0.5),  (4*x6)(x6 - 1)
//   6  + (dUc*rc - Uc)
//   7  F = ... + dUc/r,   u = ... - dUc*r
// Operands that meet at a unit after paths of different latency are
// realigned with shift registers, so there is no control at all: one r2 is
// accepted every cycle and one (F, u) pair leaves every cycle, LATENCY
// cycles later (119 with 17/12/32/47-stage adder/multiplier/divider/square
// rooter). F is held back to leave together with u. The square root may be
// up to 70 stages deep before it adds latency. The unit depths are
// parameters (defaults from fp64_pkg); every delay and LATENCY follow from
// them. A valid bit travels through a matching shift register.
//
// dUc and ushift = dUc*rc - Uc are constants of the simulation supplied by
// the host; they must be held steady while operands are in flight (this
// design's choice: they are not pipelined with the data). The sign of the
// dUc*r term follows the dataflow graph (a subtraction at the last level).
module lj_pipeline
  import fp64_pkg::*;
#(
  parameter int unsigned ADD_LAT  = ADD_STAGES,
  parameter int unsigned MUL_LAT  = MUL_STAGES,
  parameter int unsigned DIV_LAT  = DIV_STAGES,
  parameter int unsigned SQRT_LAT = SQRT_STAGES
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fp64_t duc,       // dUc
  input  fp64_t ushift,    // dUc*rc - Uc
  input  logic  in_valid,
  input  fp64_t r2,
  output logic  out_valid,
  output fp64_t force_f,   // F
  output fp64_t pot_u      // u
);

  localparam int unsigned A = ADD_LAT;
  localparam int unsigned M = MUL_LAT;
  localparam int unsigned D = DIV_LAT;
  localparam int unsigned S = SQRT_LAT;

  // cycle (after r2 enters) at which each value is ready
  localparam int unsigned T_X    = D;                  // 1/r^2
  localparam int unsigned T_R    = S;                  // r
  localparam int unsigned T_DR   = T_R + M;            // dUc*r
  localparam int unsigned T_QR   = T_R + D;            // dUc/r
  localparam int unsigned T_X2   = T_X + M;            // 48x and x*x
  localparam int unsigned T_X6   = T_X2 + M;           // 1/r^6
  localparam int unsigned T_L4M  = T_X6 + M;           // level 4 products
  localparam int unsigned T_L4A  = T_X6 + A;           // level 4 differences
  localparam int unsigned T_L5   = max2(T_L4M, T_L4A); // level 5 start
  localparam int unsigned T_L5E  = T_L5 + M;           // level 5 products
  localparam int unsigned T_L6E  = T_L5E + A;          // + ushift
  localparam int unsigned T_L7   = max2(max2(T_L6E, T_QR), T_DR);
  localparam int unsigned LATENCY = T_L7 + A;

  // ---------------- level 1 ----------------
  fp64_t x, r;
  fp_div  u_inv  (.clk(clk), .a(FP_ONE), .b(r2), .y(x));
  fp_sqrt #(.STAGES(S)) u_sqrt (.clk(clk), .a(r2), .y(r));

  // ---------------- level 2 ----------------
  fp64_t dr, qr, x48, xx;
  fp_mul #(.STAGES(M)) u_dr (.clk(clk), .a(duc), .b(r), .y(dr));
  fp_div #(.STAGES(D)) u_qr (.clk(clk), .a(duc), .b(r), .y(qr));
  fp_mul #(.STAGES(M)) u_x48 (.clk(clk), .a(FP_FORTYEIGHT), .b(x), .y(x48));
  fp_mul #(.STAGES(M)) u_xx (.clk(clk), .a(x), .b(x), .y(xx));

  // ---------------- level 3 ----------------
  fp64_t x_d, x6;
  delay_line #(.DEPTH(T_X2 - T_X)) d_x (.clk(clk), .rst_n(1'b1), .d(x), .q(x_d));
  fp_mul #(.STAGES(M)) u_x6 (.clk(clk), .a(xx), .b(x_d), .y(x6));

  // ---------------- level 4 ----------------
  fp64_t x48_d, f_a, f_b, p_a, p_b;
  delay_line #(.DEPTH(T_X6 - T_X2)) d_x48 (.clk(clk), .rst_n(1'b1), .d(x48), .q(x48_d));
  fp_mul #(.STAGES(M)) u_fa (.clk(clk), .a(x48_d), .b(x6), .y(f_a));
  fp_add #(.STAGES(A)) u_fb (.clk(clk), .a(x6), .b(FP_HALF), .sub(1'b1), .y(f_b));
  fp_mul #(.STAGES(M)) u_pa (.clk(clk), .a(FP_FOUR), .b(x6), .y(p_a));
  fp_add #(.STAGES(A)) u_pb (.clk(clk), .a(x6), .b(FP_ONE), .sub(1'b1), .y(p_b));

  // ---------------- level 5 ----------------
  fp64_t f_a_d, f_b_d, p_a_d, p_b_d, f_m, p_m;
  delay_line #(.DEPTH(T_L5 - T_L4M)) d_fa (.clk(clk), .rst_n(1'b1), .d(f_a), .q(f_a_d));
  delay_line #(.DEPTH(T_L5 - T_L4A)) d_fb (.clk(clk), .rst_n(1'b1), .d(f_b), .q(f_b_d));
  delay_line #(.DEPTH(T_L5 - T_L4M)) d_pa (.clk(clk), .rst_n(1'b1), .d(p_a), .q(p_a_d));
  delay_line #(.DEPTH(T_L5 - T_L4A)) d_pb (.clk(clk), .rst_n(1'b1), .d(p_b), .q(p_b_d));
  fp_mul #(.STAGES(M)) u_fm (.clk(clk), .a(f_a_d), .b(f_b_d), .y(f_m));
  fp_mul #(.STAGES(M)) u_pm (.clk(clk), .a(p_a_d), .b(p_b_d), .y(p_m));

  // ---------------- level 6 ----------------
  fp64_t p_c;
  fp_add #(.STAGES(A)) u_pc (.clk(clk), .a(p_m), .b(ushift), .sub(1'b0), .y(p_c));

  // ---------------- level 7 ----------------
  fp64_t f_m_d, qr_d, p_c_d, dr_d;
  delay_line #(.DEPTH(T_L7 - T_L5E)) d_fm (.clk(clk), .rst_n(1'b1), .d(f_m), .q(f_m_d));
  delay_line #(.DEPTH(T_L7 - T_QR))  d_qr (.clk(clk), .rst_n(1'b1), .d(qr), .q(qr_d));
  delay_line #(.DEPTH(T_L7 - T_L6E)) d_pc (.clk(clk), .rst_n(1'b1), .d(p_c), .q(p_c_d));
  delay_line #(.DEPTH(T_L7 - T_DR))  d_dr (.clk(clk), .rst_n(1'b1), .d(dr), .q(dr_d));
  fp_add #(.STAGES(A)) u_f (.clk(clk), .a(f_m_d), .b(qr_d), .sub(1'b0), .y(force_f));
  fp_add #(.STAGES(A)) u_u (.clk(clk), .a(p_c_d), .b(dr_d), .sub(1'b1), .y(pot_u));

  // ---------------- valid ----------------
  delay_line #(.WIDTH(1), .DEPTH(LATENCY), .HAS_RESET(1'b1)) d_v (
    .clk(clk), .rst_n(rst_n), .d(in_valid), .q(out_valid)
  );

endmodule
