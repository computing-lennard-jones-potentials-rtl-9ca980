// tb_lj_pipeline: self-checking test of one force/potential pipeline.
// Streams squared distances 0.64 <= r^2 < rc^2 with occasional idle
// cycles, and checks every (F, u) pair against the real-number reference,
// that it appears exactly 119 cycles after its operand with out_valid set,
// that out_valid is never set without an operand behind it, and that F and
// u both vanish at the cutoff r = rc. Two more pipelines with deeper
// square rooters check the schedule's slack: with a 70-stage square rooter
// the latency must stay 119, with 71 stages it must grow to 120, and both
// must still give correct results.
module tb_lj_pipeline;
  import fp64_pkg::*;
  import lj_ref_pkg::*;

  localparam int N   = 1500;
  localparam int LAT = 119;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, out_valid;
  fp64_t r2, f, u;
  real   r2_hist [N + LAT + 10];
  logic  v_hist  [N + LAT + 10];
  int checks = 0, failures = 0, outputs = 0;

  always #5 clk = ~clk;

  // deeper square rooters: at the slack limit, and one stage beyond it
  logic  ov70, ov71;
  fp64_t f70, u70, f71, u71;
  lj_pipeline #(.SQRT_LAT(70)) dut70 (
    .clk(clk), .rst_n(rst_n), .duc($realtobits(DUC)), .ushift($realtobits(USHIFT)),
    .in_valid(in_valid), .r2(r2), .out_valid(ov70), .force_f(f70), .pot_u(u70)
  );
  lj_pipeline #(.SQRT_LAT(71)) dut71 (
    .clk(clk), .rst_n(rst_n), .duc($realtobits(DUC)), .ushift($realtobits(USHIFT)),
    .in_valid(in_valid), .r2(r2), .out_valid(ov71), .force_f(f71), .pot_u(u71)
  );

  task automatic chk_variant(input int c, input int lat, input logic ov, input fp64_t fv, input fp64_t uv);
    checks++;
    if (c >= lat && v_hist[c-lat]) begin
      if (!ov || !close($bitstoreal(fv), ref_force(r2_hist[c-lat]), scale_force(r2_hist[c-lat]))
              || !close($bitstoreal(uv), ref_pot(r2_hist[c-lat]), scale_pot(r2_hist[c-lat]))) begin
        failures++;
        if (failures < 10) $display("FAIL latency-%0d pipeline at %0d", lat, c);
      end
    end else if (ov) begin
      failures++;
      if (failures < 10) $display("FAIL latency-%0d pipeline: spurious out_valid at %0d", lat, c);
    end
  endtask

  lj_pipeline dut (
    .clk(clk), .rst_n(rst_n), .duc($realtobits(DUC)), .ushift($realtobits(USHIFT)),
    .in_valid(in_valid), .r2(r2), .out_valid(out_valid), .force_f(f), .pot_u(u)
  );

  initial begin
    in_valid = 1'b0; r2 = FP_ONE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < N + LAT + 6; c++) begin
      // output due now belongs to the operand applied LAT cycles ago
      checks++;
      if (c >= LAT && v_hist[c-LAT]) begin
        outputs++;
        if (!out_valid) failures++;
        else begin
          checks += 2;
          if (!close($bitstoreal(f), ref_force(r2_hist[c-LAT]), scale_force(r2_hist[c-LAT]))) begin
            failures++;
            if (failures < 10) $display("FAIL F r2=%f got %e want %e", r2_hist[c-LAT], $bitstoreal(f), ref_force(r2_hist[c-LAT]));
          end
          if (!close($bitstoreal(u), ref_pot(r2_hist[c-LAT]), scale_pot(r2_hist[c-LAT]))) begin
            failures++;
            if (failures < 10) $display("FAIL u r2=%f got %e want %e", r2_hist[c-LAT], $bitstoreal(u), ref_pot(r2_hist[c-LAT]));
          end
          if (r2_hist[c-LAT] == RC * RC) begin
            checks++;
            if (absr($bitstoreal(f)) > 1e-15 || absr($bitstoreal(u)) > 1e-15) begin
              failures++;
              $display("FAIL at cutoff F=%e u=%e", $bitstoreal(f), $bitstoreal(u));
            end
          end
        end
      end else if (out_valid) begin
        failures++;
        $display("FAIL spurious out_valid at %0d", c);
      end
      chk_variant(c, LAT, ov70, f70, u70);
      chk_variant(c, LAT + 1, ov71, f71, u71);
      v_hist[c]  = (c < N) && ((c % 37) != 5);
      r2_hist[c] = (c == 100) ? RC * RC : rand_r2();
      in_valid   = v_hist[c];
      r2         = $realtobits(r2_hist[c]);
      @(posedge clk); #1;
    end
    checks++;
    if (outputs < N * 9 / 10) failures++;
    $display("outputs checked: %0d", outputs);
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
