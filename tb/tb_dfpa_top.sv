// tb_dfpa_top: end-to-end test of the full-size architecture (N = 15, a
// 15 x 16 grid of 240 PEs) with the top's default parameters.
// For each system the testbench streams the augmented matrix in through the
// bit-serial row inputs while load_en is high, waits for done, collects the
// bit-serial results while unload_valid is high, and compares every element
// with a reference one-step division-free elimination that uses the same
// arithmetic as a PE (32-bit signed operands, 64-bit wrap-around results).
// It also checks the solve time in cycles and counts each mechanism of the
// schedule: serial load, latch, vertical hops downwards and upwards,
// horizontal hops to the right and to the left, pivot-row hold, computation,
// waiting for the grid, capture and serial unload. A mechanism that never
// occurs counts as a failure.
module tb_dfpa_top;
  import dfpa_pkg::*;
  localparam int N = 15;
  localparam int ROWS = N, COLS = N + 1;
  localparam int SOLVE_CYCLES = 2 * REG_W * COLS + ROWS * (ROWS + COLS + 7) + 3;

  logic clk = 0, rst = 1, start = 0;
  logic busy, done, load_en, unload_valid;
  logic [N-1:0] ser_in = '0, ser_out;
  logic [K_W-1:0] iter;
  int checks = 0, failures = 0;

  word_t m   [ROWS][COLS];
  word_t got [ROWS][COLS];
  int in_pos, out_pos, busy_cycles;

  typedef enum int { MV_LOAD, MV_LATCH, MV_VDOWN, MV_VUP, MV_HRIGHT, MV_HLEFT,
                     MV_HOLD, MV_COMPUTE, MV_WAIT, MV_CAPTURE, MV_UNLOAD, MV_NUM } mech_t;
  int mech [MV_NUM];

  dfpa_top dut (.clk, .rst, .start, .busy, .done, .load_en, .ser_in, .unload_valid, .ser_out, .iter);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint s32(word_t w);
    return longint'(signed'(w[31:0]));
  endfunction

  task automatic reference();
    word_t d [ROWS][COLS];
    for (int kk = 0; kk < ROWS; kk++) begin
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          d[i][j] = (i == kk) ? m[i][j]
                  : word_t'(s32(m[kk][kk]) * s32(m[i][j]) - s32(m[i][kk]) * s32(m[kk][j]));
      m = d;
    end
  endtask

  // Host side of the serial interface, driven between clock edges.
  always @(negedge clk) begin
    if (load_en) begin
      int j, b;
      j = COLS - 1 - in_pos / REG_W;
      b = REG_W - 1 - in_pos % REG_W;
      for (int i = 0; i < ROWS; i++) ser_in[i] = m[i][j][b];
      in_pos++;
    end
    if (unload_valid) begin
      int j, b;
      j = COLS - 1 - out_pos / REG_W;
      b = REG_W - 1 - out_pos % REG_W;
      for (int i = 0; i < ROWS; i++) got[i][j][b] = ser_out[i];
      out_pos++;
    end
    if (busy) busy_cycles++;
  end

  // Mechanism counters, observed on the master's broadcast.
  always @(posedge clk) if (!rst) begin
    unique case (dut.u_master.cmd)
      CMD_SHIFT:   if (load_en) mech[MV_LOAD]++; else mech[MV_UNLOAD]++;
      CMD_LATCH:   mech[MV_LATCH]++;
      CMD_VFWD: begin
        if (int'(iter) < ROWS - 1) mech[MV_VDOWN]++;
        if (int'(iter) > 0)        mech[MV_VUP]++;
      end
      CMD_HFWD: begin
        if (int'(iter) < COLS - 1) mech[MV_HRIGHT]++;
        if (int'(iter) > 0)        mech[MV_HLEFT]++;
      end
      CMD_COMPUTE: mech[MV_COMPUTE]++;
      CMD_CAPTURE: mech[MV_CAPTURE]++;
      default: if (busy && !done) mech[MV_WAIT]++;  // only the wait state broadcasts NOP while busy
    endcase
    // PE (0,0) in its write-back step without writing: the pivot row held.
    if (dut.u_array.g_row[0].g_col[0].u_pe.step == ST_WB &&
        !dut.u_array.g_row[0].g_col[0].u_pe.wb_en) mech[MV_HOLD]++;
  end

  task automatic run_system(int range_);
    word_t a [ROWS][COLS];
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        a[i][j] = (range_ == 0) ? word_t'(longint'(signed'($urandom)))
                                : word_t'(longint'($urandom_range(0, 2 * range_)) - range_);
    m = a;
    in_pos = 0; out_pos = 0; busy_cycles = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    reference();
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        checks++;
        if (got[i][j] !== m[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) = %h exp %h", i, j, got[i][j], m[i][j]);
        end
      end
    checks++;
    if (busy_cycles != SOLVE_CYCLES || in_pos != REG_W * COLS || out_pos != REG_W * COLS) begin
      failures++;
      $display("FAIL cycles %0d exp %0d, bits in %0d out %0d", busy_cycles, SOLVE_CYCLES, in_pos, out_pos);
    end
    // The pivot row of the last iteration is the last row of A; every other
    // row has a zero in column N-1 after the last pivot.
    for (int i = 0; i < ROWS - 1; i++) begin
      checks++;
      if (got[i][ROWS-1] !== '0) begin failures++; $display("FAIL not eliminated (%0d)", i); end
    end
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(negedge clk); rst = 0;
    run_system(3);
    run_system(0);
    $display("solve time %0d cycles for N = %0d", SOLVE_CYCLES, N);
    for (int i = 0; i < MV_NUM; i++) begin
      checks++;
      $display("mechanism %s: %0d", mech_t'(i), mech[i]);
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_t'(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
