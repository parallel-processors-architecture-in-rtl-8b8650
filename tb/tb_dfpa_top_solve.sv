// tb_dfpa_top_solve: solves small linear systems end to end (N = 4).
// Each system A x = b is built from a random integer matrix A and a random
// integer solution x, with b = A x. After the array has diagonalised [A|b]
// the host step x_i = b'_i / a'_ii is done here, and the testbench checks
// that every division is exact and returns the chosen x_i, and that every
// off-diagonal element of A' is zero. Singular systems (some a'_ii = 0) and
// systems whose intermediate values would not fit a 32-bit operand are
// skipped and drawn again.
module tb_dfpa_top_solve;
  import dfpa_pkg::*;
  localparam int N = 4;
  localparam int ROWS = N, COLS = N + 1;

  logic clk = 0, rst = 1, start = 0;
  logic busy, done, load_en, unload_valid;
  logic [N-1:0] ser_in = '0, ser_out;
  logic [K_W-1:0] iter;
  int checks = 0, failures = 0, solved = 0;

  word_t m   [ROWS][COLS];
  word_t got [ROWS][COLS];
  longint x  [N];
  int in_pos, out_pos;

  dfpa_top #(.N(N)) dut (.clk, .rst, .start, .busy, .done, .load_en, .ser_in,
                         .unload_valid, .ser_out, .iter);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (load_en) begin
      for (int i = 0; i < ROWS; i++)
        ser_in[i] = m[i][COLS - 1 - in_pos / REG_W][REG_W - 1 - in_pos % REG_W];
      in_pos++;
    end
    if (unload_valid) begin
      for (int i = 0; i < ROWS; i++)
        got[i][COLS - 1 - out_pos / REG_W][REG_W - 1 - out_pos % REG_W] = ser_out[i];
      out_pos++;
    end
  end

  // Exact elimination in 64-bit integers; returns 0 if a value a later step
  // uses as an operand does not fit 32 bits or a pivot is zero.
  function automatic bit usable(longint a [ROWS][COLS]);
    longint d [ROWS][COLS];
    for (int kk = 0; kk < ROWS; kk++) begin
      if (a[kk][kk] == 0) return 0;
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          if (a[i][j] > 64'sd2147483647 || a[i][j] < -64'sd2147483648) return 0;
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          d[i][j] = (i == kk) ? a[i][j] : a[kk][kk] * a[i][j] - a[i][kk] * a[kk][j];
      a = d;
    end
    return 1;
  endfunction

  task automatic one_system();
    longint a [ROWS][COLS];
    do begin
      for (int j = 0; j < N; j++) x[j] = longint'($urandom_range(0, 10)) - 5;
      for (int i = 0; i < ROWS; i++) begin
        a[i][N] = 0;
        for (int j = 0; j < N; j++) begin
          a[i][j] = longint'($urandom_range(0, 8)) - 4;
          a[i][N] += a[i][j] * x[j];
        end
      end
    end while (!usable(a));
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) m[i][j] = word_t'(a[i][j]);
    in_pos = 0; out_pos = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      longint aii, bi;
      aii = longint'(got[i][i]);
      bi  = longint'(got[i][N]);
      checks++;
      if (aii == 0 || bi % aii != 0 || bi / aii != x[i]) begin
        failures++;
        $display("FAIL x[%0d]: b'=%0d a'=%0d expected x=%0d", i, bi, aii, x[i]);
      end
      for (int j = 0; j < N; j++) if (j != i) begin
        checks++;
        if (got[i][j] != '0) begin failures++; $display("FAIL off-diagonal (%0d,%0d)", i, j); end
      end
    end
    solved++;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 20; n++) one_system();
    $display("%0d systems solved", solved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
