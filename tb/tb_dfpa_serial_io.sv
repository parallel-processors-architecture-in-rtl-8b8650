// tb_dfpa_serial_io: self-checking test of the 64-bit serial I/O register.
// Shifts random words in MSB first and checks the parallel contents; loads
// words in parallel and checks that they leave on so MSB first; checks that
// nothing moves while ce = 0.
module tb_dfpa_serial_io;
  logic clk = 0, rst = 1, si = 0, ce = 0, pload = 0, so;
  logic [63:0] pd = 0, q, w;
  int checks = 0, failures = 0;

  dfpa_serial_io #(.W(64)) dut (.clk, .rst, .si, .ce, .pload, .pd, .q, .so);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 20; n++) begin
      w = {$urandom, $urandom};
      for (int b = 63; b >= 0; b--) begin
        ce = 1; si = w[b]; @(negedge clk);
      end
      ce = 0;
      checks++;
      if (q !== w) begin failures++; $display("FAIL serial in %h exp %h", q, w); end
      repeat (3) @(negedge clk);
      checks++;
      if (q !== w) begin failures++; $display("FAIL hold"); end
    end
    for (int n = 0; n < 20; n++) begin
      w = {$urandom, $urandom};
      pload = 1; pd = w; @(negedge clk); pload = 0;
      for (int b = 63; b >= 0; b--) begin
        checks++;
        if (so !== w[b]) begin failures++; $display("FAIL serial out bit %0d", b); end
        ce = 1; si = 0; @(negedge clk);
      end
      ce = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
