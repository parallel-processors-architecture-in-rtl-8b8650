// tb_dfpa_array: self-checking test of a 3 x 4 PE grid driven command by
// command from the testbench. Random coefficients are shifted in bit-serially
// on every row and latched; each elimination step (vertical send, ROWS-1
// vertical hops, horizontal send, COLS-1 horizontal hops, compute) is issued
// and the whole grid is compared with a reference elimination after every
// pivot; finally the results are captured and shifted out and compared again.
module tb_dfpa_array;
  import dfpa_pkg::*;
  localparam int unsigned ROWS = 3, COLS = 4;
  logic clk = 0, rst = 1;
  cmd_t cmd = CMD_NOP;
  logic [K_W-1:0] k = '0;
  logic [ROWS-1:0] ser_in = '0, ser_out;
  logic all_done;
  word_t aij [ROWS][COLS];
  word_t m [ROWS][COLS];
  word_t got [ROWS][COLS];
  int checks = 0, failures = 0;

  dfpa_array #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst, .cmd, .k, .ser_in, .ser_out, .all_done, .aij);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint s32(word_t w);
    return longint'(signed'(w[31:0]));
  endfunction

  // One pivot of one-step division-free elimination, PE arithmetic.
  task automatic ref_step(int kk);
    word_t d [ROWS][COLS];
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        d[i][j] = (i == kk) ? m[i][j]
                : word_t'(s32(m[kk][kk]) * s32(m[i][j]) - s32(m[i][kk]) * s32(m[kk][j]));
    m = d;
  endtask

  task automatic compare(string what);
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        checks++;
        if (aij[i][j] !== m[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL %s (%0d,%0d) = %h exp %h", what, i, j, aij[i][j], m[i][j]);
        end
      end
  endtask

  task automatic issue(cmd_t c, int kk, int times);
    for (int t = 0; t < times; t++) begin
      cmd = c; k = K_W'(kk);
      @(negedge clk);
    end
    cmd = CMD_NOP;
  endtask

  task automatic run_system(int range_);
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        m[i][j] = (range_ == 0) ? word_t'({$urandom, $urandom})
                                : word_t'(longint'($urandom_range(0, 2 * range_)) - range_);
    // serial load: column COLS-1 first, MSB first
    for (int j = COLS - 1; j >= 0; j--)
      for (int b = REG_W - 1; b >= 0; b--) begin
        cmd = CMD_SHIFT;
        for (int i = 0; i < ROWS; i++) ser_in[i] = m[i][j][b];
        @(negedge clk);
      end
    issue(CMD_LATCH, 0, 1);
    compare("load");
    for (int kk = 0; kk < ROWS; kk++) begin
      int w;
      issue(CMD_VSEND, kk, 1);
      issue(CMD_VFWD, kk, ROWS - 1);
      issue(CMD_HSEND, kk, 1);
      issue(CMD_HFWD, kk, COLS - 1);
      issue(CMD_COMPUTE, kk, 1);
      w = 0;
      while (!all_done && w < 100) begin @(negedge clk); w++; end
      ref_step(kk);
      compare($sformatf("pivot %0d", kk));
    end
    issue(CMD_CAPTURE, 0, 1);
    for (int j = COLS - 1; j >= 0; j--)
      for (int b = REG_W - 1; b >= 0; b--) begin
        for (int i = 0; i < ROWS; i++) got[i][j][b] = ser_out[i];
        cmd = CMD_SHIFT;
        @(negedge clk);
      end
    cmd = CMD_NOP;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        checks++;
        if (got[i][j] !== m[i][j]) begin failures++; $display("FAIL unload (%0d,%0d)", i, j); end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 5; n++) run_system(9);
    for (int n = 0; n < 3; n++) run_system(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
