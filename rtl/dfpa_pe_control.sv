// dfpa_pe_control: sequencer of one PE's determinant computation.
//
// A pulse on start (with the PE's pivot-row flag on hold) runs five steps, one
// per clock: MUL1 loads a_kk and a_ij into the multiplier, MUL2 stores their
// product and loads a_ik and a_kj, SUB stores the second product, ADD stores
// the difference and WB writes it back as the new a_ij. wb_en is raised in WB
// unless hold was set at start: the pivot row keeps its values. done is a
// level that rises after WB and falls on the next start. The split into two
// multiplications and one subtraction follows the PE's description; the
// one-step-per-clock schedule is this design's choice.
module dfpa_pe_control
  import dfpa_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  logic  hold,
  output step_t step,
  output logic  wb_en,
  output logic  done
);
  logic hold_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      step   <= ST_IDLE;
      hold_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      unique case (step)
        ST_IDLE: if (start) begin
          step   <= ST_MUL1;
          hold_q <= hold;
          done   <= 1'b0;
        end
        ST_MUL1: step <= ST_MUL2;
        ST_MUL2: step <= ST_SUB;
        ST_SUB:  step <= ST_ADD;
        ST_ADD:  step <= ST_WB;
        ST_WB: begin
          step <= ST_IDLE;
          done <= 1'b1;
        end
        default: step <= ST_IDLE;
      endcase
    end
  end

  assign wb_en = (step == ST_WB) && !hold_q;

  // A new computation may only be started from idle.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> step == ST_IDLE);
endmodule
