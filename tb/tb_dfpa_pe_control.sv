// tb_dfpa_pe_control: self-checking test of the PE computation sequencer.
// Starts the sequence with and without hold and checks the step order
// MUL1, MUL2, SUB, ADD, WB, the write-back enable, and that done rises
// exactly five clocks after start and falls on the next start.
module tb_dfpa_pe_control;
  import dfpa_pkg::*;
  logic clk = 0, rst = 1, start = 0, hold = 0, wb_en, done;
  step_t step;
  int checks = 0, failures = 0;
  step_t exp_seq [5] = '{ST_MUL1, ST_MUL2, ST_SUB, ST_ADD, ST_WB};

  dfpa_pe_control dut (.clk, .rst, .start, .hold, .step, .wb_en, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic h);
    @(negedge clk); start = 1; hold = h;
    @(negedge clk); start = 0; hold = ~h;
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (step !== exp_seq[s] || done !== 1'b0) begin
        failures++; $display("FAIL step %0d = %0d done=%0d", s, step, done);
      end
      checks++;
      if (wb_en !== (s == 4 && !h)) begin failures++; $display("FAIL wb_en step %0d hold %0d", s, h); end
      @(negedge clk);
    end
    checks++;
    if (step !== ST_IDLE || done !== 1'b1) begin failures++; $display("FAIL not done"); end
    repeat (3) @(negedge clk);
    checks++;
    if (done !== 1'b1 || wb_en !== 1'b0) begin failures++; $display("FAIL done not held"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    checks++;
    if (done !== 1'b0 || step !== ST_IDLE) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 20; i++) run(1'($urandom));
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
