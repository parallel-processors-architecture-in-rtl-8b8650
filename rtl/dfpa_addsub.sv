// dfpa_addsub: the PE's adder-subtractor.
//
// Combinational two's-complement adder-subtractor on W-bit words:
// s = a + b when sub = 0 and s = a - b when sub = 1. Subtraction is done as
// a + ~b + 1 so a single carry chain serves both operations. In the PE it forms
// the determinant from the two 64-bit products; the PE registers the result.
// The 64-bit width follows the size reported for this unit (three 64-bit buses
// and one control pin); the select encoding is this design's choice.
module dfpa_addsub #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s
);
  logic [W-1:0] b_eff;

  always_comb begin
    b_eff = sub ? ~b : b;
    s     = a + b_eff + W'(sub);
  end
endmodule
