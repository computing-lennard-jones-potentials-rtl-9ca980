// delay_line: a DEPTH-cycle shift register of WIDTH-bit words.
//
// Operands in the force/potential pipeline reach each floating-point unit
// from units of different latency. These delays, built as plain shift
// registers as in the original implementation, realign them so that no
// control logic is needed: q(t) = d(t - DEPTH). DEPTH = 0 gives a wire.
// With HAS_RESET set, an active-low synchronous reset clears every stage
// (used for the valid bits); data delays leave it off so that they can map
// onto shift-register primitives. The reset polarity and style are this
// design's choice.
module delay_line #(
  parameter int unsigned WIDTH     = 64,
  parameter int unsigned DEPTH     = 1,
  parameter bit          HAS_RESET = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_shift
    logic [WIDTH-1:0] sr [DEPTH];

    always_ff @(posedge clk) begin
      if (HAS_RESET && !rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
      end
    end

    assign q = sr[DEPTH-1];
  end

endmodule
