// lj_accel: Lennard-Jones force and potential accelerator, top level.
//
// NUM_PIPES independent copies of lj_pipeline (two by default, the
// configuration evaluated for the original design) side by side. The
// pipelines share nothing but the clock, the reset and the two simulation
// constants dUc and dUc*rc - Uc; each takes its own stream of squared pair
// distances, one per cycle, and returns one scalar force factor F and one
// potential u per cycle, 119 cycles later, flagged by out_valid. How the
// host divides pairs between the pipelines is left to the host. At
// 16 floating-point operations per result pair, NUM_PIPES pipelines deliver
// 16 * NUM_PIPES operations per cycle.
module lj_accel
  import fp64_pkg::*;
#(
  parameter int unsigned NUM_PIPES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fp64_t duc,                      // dUc
  input  fp64_t ushift,                   // dUc*rc - Uc
  input  logic  in_valid  [NUM_PIPES],
  input  fp64_t r2        [NUM_PIPES],
  output logic  out_valid [NUM_PIPES],
  output fp64_t force_f   [NUM_PIPES],
  output fp64_t pot_u     [NUM_PIPES]
);

  for (genvar p = 0; p < int'(NUM_PIPES); p++) begin : g_pipe
    lj_pipeline u_pipe (
      .clk      (clk),
      .rst_n    (rst_n),
      .duc      (duc),
      .ushift   (ushift),
      .in_valid (in_valid[p]),
      .r2       (r2[p]),
      .out_valid(out_valid[p]),
      .force_f  (force_f[p]),
      .pot_u    (pot_u[p])
    );
  end

endmodule
