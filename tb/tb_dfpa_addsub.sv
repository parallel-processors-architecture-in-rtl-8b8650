// tb_dfpa_addsub: self-checking test of the 64-bit adder-subtractor.
// Drives random and corner operands in both modes and compares s with
// a + b or a - b computed by the simulator's own 64-bit arithmetic.
module tb_dfpa_addsub;
  logic [63:0] a, b, s, exp_s;
  logic        sub;
  int checks = 0, failures = 0;

  dfpa_addsub #(.W(64)) dut (.a, .b, .sub, .s);

  task automatic check_one(input logic [63:0] ta, input logic [63:0] tb_, input logic tsub);
    a = ta; b = tb_; sub = tsub;
    #1;
    exp_s = tsub ? (ta - tb_) : (ta + tb_);
    checks++;
    if (s !== exp_s) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0d s=%h exp=%h", ta, tb_, tsub, s, exp_s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(64'd5, 64'd3, 1'b1);
    check_one(64'd3, 64'd5, 1'b1);
    check_one(64'd0, 64'd1, 1'b1);
    check_one('1, 64'd1, 1'b0);
    check_one(64'h8000_0000_0000_0000, 64'd1, 1'b1);
    for (int i = 0; i < 500; i++)
      check_one({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
