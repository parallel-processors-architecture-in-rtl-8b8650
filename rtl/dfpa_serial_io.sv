// dfpa_serial_io: the PE's serial data input/output register (SR:64).
//
// A W-bit shift register. When ce = 1 it shifts one place towards the MSB and
// takes si into bit 0; so = q[W-1] is the serial output, so a word leaves MSB
// first and a chain of these registers behaves as one long shift register.
// pload (which has priority over ce) loads the parallel word pd. The serial
// input, shift enable and MSB output follow the unit's schematic; the parallel
// load and parallel output are this design's addition, used to hand the word
// to and from the PE's memory.
module dfpa_serial_io #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         si,
  input  logic         ce,
  input  logic         pload,
  input  logic [W-1:0] pd,
  output logic [W-1:0] q,
  output logic         so
);
  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (pload) q <= pd;
    else if (ce)    q <= {q[W-2:0], si};
  end

  assign so = q[W-1];
endmodule
