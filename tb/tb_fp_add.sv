// tb_fp_add: self-checking test of fp_add at its default depth (17).
// Streams one operation per cycle (random operands over several exponent
// spreads, exact cancellations, operands far apart, zeros) and compares
// every result, bit for bit, with the simulator's own double-precision
// addition, which rounds to nearest even like the unit. Checking result i
// exactly STAGES cycles after operand i also checks the latency.
module tb_fp_add;
  import fp64_pkg::*;

  localparam int N = 3000;
  localparam int LAT = ADD_STAGES;

  logic  clk = 1'b0;
  fp64_t a, b, y;
  logic  sub;
  fp64_t expv [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_add dut (.clk(clk), .a(a), .b(b), .sub(sub), .y(y));

  function automatic fp64_t rnd(int unsigned ebase, int unsigned espan);
    logic [51:0] m;
    logic [10:0] e;
    m = {$urandom(), $urandom()};
    e = 11'(ebase + ($urandom() % espan));
    return {1'($urandom()), e, m};
  endfunction

  initial begin
    a = '0; b = '0; sub = 1'b0;
    for (int c = 0; c < N + LAT; c++) begin
      @(posedge clk); #1;
      if (c >= LAT) begin
        checks++;
        if (y !== expv[c-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: got %h exp %h", c-LAT, y, expv[c-LAT]);
        end
      end
      if (c < N) begin
        case (c % 6)
          0: begin a = rnd(1000, 40); b = rnd(1000, 40); end
          1: begin a = rnd(1023, 2);  b = rnd(1023, 2);  end
          2: begin a = rnd(1023, 1);  b = a ^ {$urandom() % 3 == 0, 60'b0, 3'($urandom())}; end
          3: begin a = rnd(900, 200); b = rnd(900, 200); end
          4: begin a = rnd(1023, 1);  b = {1'($urandom()), 11'd1023 - 11'(50 + $urandom() % 30), 52'($urandom())}; end
          default: begin a = rnd(1010, 20); b = (c % 12 == 5) ? FP_ZERO : a; end
        endcase
        sub = 1'($urandom());
        expv[c] = sub ? $realtobits($bitstoreal(a) - $bitstoreal(b))
                      : $realtobits($bitstoreal(a) + $bitstoreal(b));
        // the unit returns +0 for any zero result
        if (expv[c][62:0] == 63'd0) expv[c] = FP_ZERO;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + LAT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
