// tb_lj_workload: the force/potential workload of one position update of
// a 10000-molecule simulation, about 5800 pair interactions inside the
// cutoff, run through the default two-pipeline accelerator twice:
//   pass 1: all 5800 operands into pipeline 0, back to back; the last
//           result must leave 5800 + 119 = 5919 cycles after the first
//           operand went in (about 1.02 cycles per F, u pair);
//   pass 2: the same work split 2900 / 2900 over both pipelines, which
//           must finish in 2900 + 119 = 3019 cycles.
// Every result is checked against the real-number reference, and the
// achieved floating-point operations per cycle (16 per result pair) are
// printed.
module tb_lj_workload;
  import fp64_pkg::*;
  import lj_ref_pkg::*;

  localparam int P     = 2;
  localparam int NPAIR = 5800;
  localparam int LAT   = 119;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid  [P];
  fp64_t r2        [P];
  logic  out_valid [P];
  fp64_t f         [P];
  fp64_t u         [P];
  real   q [P][$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lj_accel dut (
    .clk(clk), .rst_n(rst_n), .duc($realtobits(DUC)), .ushift($realtobits(USHIFT)),
    .in_valid(in_valid), .r2(r2), .out_valid(out_valid), .force_f(f), .pot_u(u)
  );

  // result checker: compares every valid output with the oldest operand
  int got [P];
  always @(posedge clk) begin
    #2;
    for (int p = 0; p < P; p++) begin
      if (out_valid[p]) begin
        real rv;
        checks++;
        if (q[p].size() == 0) failures++;
        else begin
          rv = q[p].pop_front();
          got[p]++;
          if (!close($bitstoreal(f[p]), ref_force(rv), scale_force(rv)) ||
              !close($bitstoreal(u[p]), ref_pot(rv), scale_pot(rv))) failures++;
        end
      end
    end
  end

  task automatic run(input int pipes, output int cycles);
    int per, start, c;
    per = NPAIR / pipes;
    for (int p = 0; p < P; p++) got[p] = 0;
    c = 0;
    // operand k of each active pipeline enters in cycle k
    while (c < per) begin
      for (int p = 0; p < P; p++) begin
        in_valid[p] = (p < pipes);
        if (p < pipes) begin
          real rv;
          rv = rand_r2();
          r2[p] = $realtobits(rv);
          q[p].push_back(rv);
        end
      end
      @(posedge clk); #1;
      c++;
    end
    for (int p = 0; p < P; p++) in_valid[p] = 1'b0;
    start = 0;
    // wait until every result is out; count cycles from the first operand
    while (got[0] + got[1] < NPAIR) begin
      @(posedge clk); #1;
      c++;
      if (c > NPAIR + 10 * LAT) break;
    end
    cycles = c;
  endtask

  initial begin
    int cyc1, cyc2;
    for (int p = 0; p < P; p++) begin in_valid[p] = 1'b0; r2[p] = FP_ONE; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    run(1, cyc1);
    $display("one pipeline : %0d pairs in %0d cycles, %0.3f cycles/pair, %0.2f flop/cycle",
             NPAIR, cyc1, $itor(cyc1) / NPAIR, 16.0 * NPAIR / cyc1);
    checks++;
    if (cyc1 != NPAIR + LAT) failures++;

    run(2, cyc2);
    $display("two pipelines: %0d pairs in %0d cycles, %0.3f cycles/pair, %0.2f flop/cycle",
             NPAIR, cyc2, $itor(cyc2) / NPAIR, 16.0 * NPAIR / cyc2);
    checks++;
    if (cyc2 != NPAIR / 2 + LAT) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NPAIR + 10 * LAT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
