// dfpa_send_counter: the data sending controller's counter.
//
// A W-bit up counter (CUENTA) with synchronous clear (rst) and count enable
// (en). c is asserted in a cycle where en = 1 and count equals last; on that
// clock the counter wraps to zero, otherwise it increments. The master uses
// several of these to time bit shifts, word shifts, channel hops and
// iterations. The pins CLK, E, RST, CUENTA(7:0) and C follow the unit's
// symbol; the programmable terminal value 'last' is this design's choice.
module dfpa_send_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] last,
  output logic [W-1:0] count,
  output logic         c
);
  assign c = en && (count == last);

  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (c)  count <= '0;
    else if (en) count <= count + 1'b1;
  end
endmodule
