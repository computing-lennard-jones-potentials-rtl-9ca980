// tb_lj_accel: end-to-end test of the accelerator top at its default size
// (two pipelines, 17/12/32/47-stage units). Each pipeline gets its own
// stream of squared distances with its own pattern of idle cycles. Every
// result is checked against the real-number reference and must appear
// exactly 119 cycles after its operand. The test counts, and requires at
// least once each: a full-rate run of back-to-back operands, an idle
// cycle (bubble) in a stream, both pipelines delivering results in the
// same cycle, a result at the cutoff distance (where F and u vanish), and
// one cycle in which 32 floating-point operations' worth of results
// (two F, u pairs) leave the design.
module tb_lj_accel;
  import fp64_pkg::*;
  import lj_ref_pkg::*;

  localparam int P   = 2;
  localparam int N   = 2000;
  localparam int LAT = 119;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid  [P];
  fp64_t r2        [P];
  logic  out_valid [P];
  fp64_t f         [P];
  fp64_t u         [P];
  real   r2_hist [P][N + LAT + 10];
  logic  v_hist  [P][N + LAT + 10];
  int checks = 0, failures = 0;
  int n_out [P];
  int n_b2b = 0, n_bubble = 0, n_both = 0, n_cutoff = 0;

  always #5 clk = ~clk;

  lj_accel dut (
    .clk(clk), .rst_n(rst_n), .duc($realtobits(DUC)), .ushift($realtobits(USHIFT)),
    .in_valid(in_valid), .r2(r2), .out_valid(out_valid), .force_f(f), .pot_u(u)
  );

  initial begin
    for (int p = 0; p < P; p++) begin in_valid[p] = 1'b0; r2[p] = FP_ONE; n_out[p] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < N + LAT + 5; c++) begin
      if (out_valid[0] && out_valid[1]) n_both++;
      for (int p = 0; p < P; p++) begin
        real rv;
        checks++;
        if (c >= LAT && v_hist[p][c-LAT]) begin
          rv = r2_hist[p][c-LAT];
          n_out[p]++;
          if (!out_valid[p]) begin
            failures++;
            $display("FAIL pipe %0d: no result 119 cycles after operand %0d", p, c-LAT);
          end else begin
            checks += 2;
            if (!close($bitstoreal(f[p]), ref_force(rv), scale_force(rv))) begin
              failures++;
              if (failures < 10) $display("FAIL F pipe %0d r2=%f got %e want %e", p, rv, $bitstoreal(f[p]), ref_force(rv));
            end
            if (!close($bitstoreal(u[p]), ref_pot(rv), scale_pot(rv))) begin
              failures++;
              if (failures < 10) $display("FAIL u pipe %0d r2=%f got %e want %e", p, rv, $bitstoreal(u[p]), ref_pot(rv));
            end
            if (rv == RC * RC) begin
              n_cutoff++;
              checks++;
              if (absr($bitstoreal(f[p])) > 1e-15 || absr($bitstoreal(u[p])) > 1e-15) failures++;
            end
          end
        end else if (out_valid[p]) begin
          failures++;
          $display("FAIL pipe %0d: spurious out_valid at %0d", p, c);
        end
        // stimulus: pipe 0 idles 1 cycle in 29, pipe 1 idles in bursts
        v_hist[p][c]  = (c < N) && ((p == 0) ? ((c % 29) != 3) : ((c % 200) < 150));
        r2_hist[p][c] = (c == 300 + p) ? RC * RC : rand_r2();
        if (c > 0 && v_hist[p][c] && v_hist[p][c-1]) n_b2b++;
        if (c < N && !v_hist[p][c]) n_bubble++;
        in_valid[p] = v_hist[p][c];
        r2[p]       = $realtobits(r2_hist[p][c]);
      end
      @(posedge clk); #1;
    end
    $display("results: pipe0=%0d pipe1=%0d", n_out[0], n_out[1]);
    $display("mechanisms: back_to_back=%0d bubbles=%0d both_pipes_out=%0d cutoff=%0d",
             n_b2b, n_bubble, n_both, n_cutoff);
    checks += 4;
    if (n_b2b == 0)    failures++;
    if (n_bubble == 0) failures++;
    if (n_both == 0)   failures++;
    if (n_cutoff == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + LAT + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
