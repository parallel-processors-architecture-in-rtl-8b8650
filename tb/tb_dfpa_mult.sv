// tb_dfpa_mult: self-checking test of the registered signed multiplier.
// Presents operands with ce = 1, checks the product one clock later against
// 64-bit signed arithmetic, and checks that ce = 0 holds the operands.
module tb_dfpa_mult;
  logic clk = 0, rst = 1, ce = 0;
  logic signed [31:0] a = 0, b = 0;
  logic signed [63:0] p, exp_p;
  int checks = 0, failures = 0;

  dfpa_mult #(.W(32)) dut (.clk, .rst, .ce, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(input logic signed [31:0] ta, input logic signed [31:0] tb_);
    @(negedge clk); a = ta; b = tb_; ce = 1;
    @(negedge clk); ce = 0; a = $urandom; b = $urandom;
    exp_p = longint'(ta) * longint'(tb_);
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("FAIL %0d * %0d = %0d exp %0d", ta, tb_, p, exp_p);
    end
    // operands held while ce = 0
    @(negedge clk);
    checks++;
    if (p !== exp_p) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    mul(3, 7);
    mul(-3, 7);
    mul(-5, -6);
    mul(32'sh7fff_ffff, 32'sh7fff_ffff);
    mul(32'sh8000_0000, 32'sh7fff_ffff);
    for (int i = 0; i < 200; i++) mul($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
