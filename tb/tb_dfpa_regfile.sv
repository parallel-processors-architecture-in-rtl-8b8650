// tb_dfpa_regfile: self-checking test of the eight-register PE memory.
// Checks reset values (ID in register 7), writes on each port, simultaneous
// writes to different registers, port 1 priority on a collision, and random
// traffic against a shadow copy kept by the testbench.
module tb_dfpa_regfile;
  localparam logic [63:0] ID = 64'h0102;
  logic clk = 0, rst = 1;
  logic we0 = 0, we1 = 0;
  logic [2:0] wa0 = 0, wa1 = 0;
  logic [63:0] wd0 = 0, wd1 = 0;
  logic [7:0][63:0] q;
  logic [63:0] shadow [8];
  int checks = 0, failures = 0;

  dfpa_regfile #(.W(64), .ID_INIT(ID)) dut (.clk, .rst, .we0, .wa0, .wd0, .we1, .wa1, .wd1, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (q[r] !== shadow[r]) begin
        failures++;
        $display("FAIL %s reg %0d = %h exp %h", what, r, q[r], shadow[r]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int r = 0; r < 8; r++) shadow[r] = (r == 7) ? ID : 64'd0;
    compare("reset");
    // both ports, different registers
    we0 = 1; wa0 = 3; wd0 = 64'd11; we1 = 1; wa1 = 0; wd1 = 64'd22;
    @(negedge clk); we0 = 0; we1 = 0;
    shadow[3] = 64'd11; shadow[0] = 64'd22;
    compare("dual");
    // collision: port 1 wins
    we0 = 1; wa0 = 5; wd0 = 64'd1; we1 = 1; wa1 = 5; wd1 = 64'd2;
    @(negedge clk); we0 = 0; we1 = 0;
    shadow[5] = 64'd2;
    compare("collision");
    for (int i = 0; i < 300; i++) begin
      we0 = 1'($urandom); wa0 = 3'($urandom); wd0 = {$urandom, $urandom};
      we1 = 1'($urandom); wa1 = 3'($urandom); wd1 = {$urandom, $urandom};
      @(negedge clk);
      if (we0) shadow[wa0] = wd0;
      if (we1) shadow[wa1] = wd1;
      we0 = 0; we1 = 0;
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
