// dfpa_mult: the PE's signed multiplier.
//
// Two W-bit operand registers (loaded when ce = 1) feed a signed W x W
// multiplier whose 2W-bit product p is available combinationally from the
// registered operands, i.e. one clock after the operands are presented.
// The registered operands in front of a signed multiplier follow the unit's
// schematic; the clock enable is this design's choice. With W = 32 the product
// maps onto four 18x18 hardware multipliers.
module dfpa_mult #(
  parameter int unsigned W = 32
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  ce,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);
  logic signed [W-1:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
    end else if (ce) begin
      a_q <= a;
      b_q <= b;
    end
  end

  always_comb p = (2*W)'(a_q) * (2*W)'(b_q);
endmodule
