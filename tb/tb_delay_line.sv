// tb_delay_line: checks that delay_line returns each word exactly DEPTH
// cycles later, for a data delay (DEPTH 5, no reset), a one-cycle delay,
// a zero-depth wire and a resettable valid delay (DEPTH 7) whose stages
// must all read zero after reset.
module tb_delay_line;
  localparam int N = 400;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [63:0] d, q5, q1, q0;
  logic        v, qv;
  logic [63:0] hist [N];
  logic        vhist [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_line #(.WIDTH(64), .DEPTH(5)) u5 (.clk(clk), .rst_n(rst_n), .d(d), .q(q5));
  delay_line #(.WIDTH(64), .DEPTH(1)) u1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1));
  delay_line #(.WIDTH(64), .DEPTH(0)) u0 (.clk(clk), .rst_n(rst_n), .d(d), .q(q0));
  delay_line #(.WIDTH(1), .DEPTH(7), .HAS_RESET(1'b1)) uv (.clk(clk), .rst_n(rst_n), .d(v), .q(qv));

  task automatic chk(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    d = '0; v = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; v = 1'b0;
    for (int c = 0; c < 7; c++) begin
      chk(64'(qv), 64'd0, "reset");
      @(posedge clk); #1;
    end
    for (int c = 0; c < N; c++) begin
      if (c >= 5) chk(q5, hist[c-5], "depth5");
      if (c >= 1) chk(q1, hist[c-1], "depth1");
      if (c >= 7) chk(64'(qv), 64'(vhist[c-7]), "valid7");
      d = {$urandom(), $urandom()};
      v = 1'($urandom());
      hist[c] = d; vhist[c] = v;
      #1 chk(q0, d, "depth0");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
