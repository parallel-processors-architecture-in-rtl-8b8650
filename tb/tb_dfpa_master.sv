// tb_dfpa_master: self-checking test of the master sequencer on a 3 x 4 grid.
// A model of the PE grid raises pe_done a chosen number of clocks after each
// COMPUTE. The testbench records the command broadcast in every busy cycle
// and compares it, cycle by cycle, with the expected schedule: REG_W*COLS
// shifts with load_en, LATCH, then per pivot k = 0..ROWS-1 VSEND, ROWS-1 VFWD,
// HSEND, COLS-1 HFWD, COMPUTE and the wait, then CAPTURE, REG_W*COLS shifts
// with unload_valid, and a single done pulse. The pivot index is checked in
// every iteration; the run is repeated with a slower grid.
module tb_dfpa_master;
  import dfpa_pkg::*;
  localparam int unsigned ROWS = 3, COLS = 4;
  logic clk = 0, rst = 1, start = 0, pe_done;
  cmd_t cmd;
  logic [K_W-1:0] k;
  logic load_en, unload_valid, busy, done;
  int checks = 0, failures = 0;
  int grid_delay = 5, cnt = 0;
  logic done_q = 0;

  dfpa_master #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst, .start, .pe_done, .cmd, .k, .load_en, .unload_valid, .busy, .done
  );

  always #5 clk = ~clk;

  // Grid model: done falls on COMPUTE and rises grid_delay clocks later.
  always_ff @(posedge clk) begin
    if (cmd == CMD_COMPUTE) begin
      done_q <= 1'b0; cnt <= grid_delay;
    end else if (cnt > 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) done_q <= 1'b1;
    end
  end
  assign pe_done = done_q;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { cmd_t c; int kk; logic ld; logic ul; logic dn; } ev_t;
  ev_t expq[$];

  task automatic push(cmd_t c, int kk, logic ld, logic ul, logic dn, int times);
    for (int i = 0; i < times; i++) expq.push_back('{c, kk, ld, ul, dn});
  endtask

  task automatic run(input int delay);
    int n;
    grid_delay = delay;
    expq.delete();
    push(CMD_SHIFT, 0, 1, 0, 0, REG_W * COLS);
    push(CMD_LATCH, 0, 0, 0, 0, 1);
    for (int kk = 0; kk < ROWS; kk++) begin
      push(CMD_VSEND, kk, 0, 0, 0, 1);
      push(CMD_VFWD, kk, 0, 0, 0, ROWS - 1);
      push(CMD_HSEND, kk, 0, 0, 0, 1);
      push(CMD_HFWD, kk, 0, 0, 0, COLS - 1);
      push(CMD_COMPUTE, kk, 0, 0, 0, 1);
      push(CMD_NOP, kk, 0, 0, 0, delay + 1);
    end
    push(CMD_CAPTURE, 0, 0, 0, 0, 1);
    push(CMD_SHIFT, 0, 0, 1, 0, REG_W * COLS);
    push(CMD_NOP, 0, 0, 0, 1, 1);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n = 0;
    while (busy && n < 10000) begin
      ev_t e;
      e = (expq.size() > 0) ? expq.pop_front() : '{CMD_NOP, -1, 0, 0, 0};
      checks++;
      if (cmd != e.c || load_en != e.ld || unload_valid != e.ul || done != e.dn ||
          (e.c inside {CMD_VSEND, CMD_VFWD, CMD_HSEND, CMD_HFWD, CMD_COMPUTE} && int'(k) != e.kk)) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: cmd=%s k=%0d ld=%0d ul=%0d dn=%0d exp cmd=%s k=%0d",
                   n, cmd.name(), k, load_en, unload_valid, done, e.c.name(), e.kk);
      end
      @(negedge clk);
      n++;
    end
    checks++;
    if (expq.size() != 0 || n != 2 * REG_W * COLS + ROWS * (ROWS + COLS + 2 + delay) + 3) begin
      failures++;
      $display("FAIL length %0d, %0d events left", n, expq.size());
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || cmd != CMD_NOP) begin failures++; $display("FAIL idle"); end
    run(5);
    run(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
