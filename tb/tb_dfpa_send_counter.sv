// tb_dfpa_send_counter: self-checking test of the data sending counter.
// Compares count and c cycle by cycle with a reference counter kept by the
// testbench, under random enable, random terminal values and a mid-run reset.
module tb_dfpa_send_counter;
  logic clk = 0, rst = 1, en = 0, c;
  logic [7:0] last = 8'd5, count;
  int ref_cnt = 0, checks = 0, failures = 0, wraps = 0;

  dfpa_send_counter #(.W(8)) dut (.clk, .rst, .en, .last, .count, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i % 500 == 0) last = 8'($urandom_range(0, 20));
      if (i == 1234) last = 8'd255;
      en  = ($urandom_range(0, 3) != 0);
      rst = (i % 777 == 776);
      #1;
      checks++;
      if (count !== 8'(ref_cnt) || (!rst && c !== (en && ref_cnt == int'(last)))) begin
        failures++;
        $display("FAIL i=%0d count=%0d exp=%0d c=%0d", i, count, ref_cnt, c);
      end
      @(negedge clk);
      if (rst) ref_cnt = 0;
      else if (en && ref_cnt == int'(last)) begin ref_cnt = 0; wraps++; end
      else if (en) ref_cnt = (ref_cnt + 1) % 256;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
