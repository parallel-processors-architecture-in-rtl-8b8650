// dfpa_regfile: the PE's memory of eight W-bit registers.
//
// Registers 0-3 hold the four coefficients of the 2x2 determinant (a_kk, a_kj,
// a_ik, a_ij), 4 and 5 the two products, 6 the difference and 7 the PE's
// identification number, as the register roles are assigned for this PE.
// Every register is readable at once on q. Two synchronous write ports let a
// PE take a_ik and a_kk from a row channel in the same cycle; when both ports
// write the same register, port 1 wins. On reset registers 0-6 clear and
// register 7 loads ID_INIT; two write ports and the reset values are this
// design's choice.
module dfpa_regfile #(
  parameter int unsigned W       = 64,
  parameter logic [W-1:0] ID_INIT = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we0,
  input  logic [2:0]       wa0,
  input  logic [W-1:0]     wd0,
  input  logic             we1,
  input  logic [2:0]       wa1,
  input  logic [W-1:0]     wd1,
  output logic [7:0][W-1:0] q
);
  logic [7:0][W-1:0] mem;

  always_ff @(posedge clk) begin
    if (rst) begin
      mem    <= '0;
      mem[7] <= ID_INIT;
    end else begin
      if (we0) mem[wa0] <= wd0;
      if (we1) mem[wa1] <= wd1;
    end
  end

  assign q = mem;
endmodule
