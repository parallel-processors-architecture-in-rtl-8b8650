// tb_dfpa_pe: self-checking test of one processor element (row 1, column 2).
// Drives the broadcast commands by hand: serial load and latch, vertical and
// horizontal send and forward in every direction (pivot above, below, left,
// right and through the PE), the determinant computation with random 32-bit
// operands against a reference a_kk*a_ij - a_ik*a_kj, the pivot-row hold,
// the five-clock compute latency, and capture plus serial unload.
module tb_dfpa_pe;
  import dfpa_pkg::*;
  logic clk = 0, rst = 1;
  cmd_t cmd = CMD_NOP;
  logic [K_W-1:0] k = '0;
  word_t v_north_in = '0, v_south_in = '0, v_north_out, v_south_out, aij;
  hword_t h_west_in = '0, h_east_in = '0, h_west_out, h_east_out;
  logic ser_in = 0, ser_out, done;
  int checks = 0, failures = 0;

  dfpa_pe #(.ROW(1), .COL(2)) dut (
    .clk, .rst, .cmd, .k, .v_north_in, .v_south_in, .v_north_out, .v_south_out,
    .h_west_in, .h_east_in, .h_west_out, .h_east_out, .ser_in, .ser_out, .done, .aij
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(input cmd_t c, input int kk);
    @(negedge clk); cmd = c; k = K_W'(kk);
    @(negedge clk); cmd = CMD_NOP;
  endtask

  task automatic load_word(input word_t w);
    for (int b = REG_W - 1; b >= 0; b--) begin
      @(negedge clk); cmd = CMD_SHIFT; ser_in = w[b];
    end
    @(negedge clk); cmd = CMD_LATCH;
    @(negedge clk); cmd = CMD_NOP;
  endtask

  function automatic word_t det(word_t akk, word_t aij_, word_t aik, word_t akj);
    longint p1, p2;
    p1 = longint'(signed'(akk[31:0])) * longint'(signed'(aij_[31:0]));
    p2 = longint'(signed'(aik[31:0])) * longint'(signed'(akj[31:0]));
    return word_t'(p1 - p2);
  endfunction

  // Full iteration seen from this PE with the pivot at (kk, kk), kk = 0 here
  // (above and left of the PE). Returns the computed a_ij.
  task automatic iterate(input word_t akk, input word_t aik, input word_t akj, input int kk,
                         output int lat);
    v_north_in = akj;
    issue(CMD_VFWD, kk);
    v_north_in = '0;
    h_west_in = '{aik: aik, akk: akk};
    issue(CMD_HFWD, kk);
    h_west_in = '0;
    @(negedge clk); cmd = CMD_COMPUTE; k = K_W'(kk);
    @(negedge clk); cmd = CMD_NOP;
    lat = 1;
    while (!done && lat < 50) begin @(negedge clk); lat++; end
  endtask

  word_t a, x, y;
  hword_t hw;
  int lat;

  initial begin
    repeat (2) @(negedge clk); rst = 0;

    // serial load and latch
    a = {$urandom, $urandom};
    load_word(a);
    chk(aij == a, "latch");

    // vertical: pivot row is this row
    issue(CMD_VSEND, 1);
    chk(v_north_out == a && v_south_out == a, "vsend");
    // pivot above: forward north -> south
    x = {$urandom, $urandom};
    v_north_in = x; issue(CMD_VFWD, 0); v_north_in = '0;
    chk(v_south_out == x && v_north_out == a, "vfwd down");
    // pivot below: forward south -> north
    y = {$urandom, $urandom};
    v_south_in = y; issue(CMD_VFWD, 5); v_south_in = '0;
    chk(v_north_out == y && v_south_out == x, "vfwd up");
    // pivot row: no forwarding
    v_south_in = ~y; v_north_in = ~x; issue(CMD_VFWD, 1); v_south_in = '0; v_north_in = '0;
    chk(v_north_out == y && v_south_out == x, "vfwd pivot row holds");

    // horizontal: pivot column is this column; a_kj register holds y
    issue(CMD_HSEND, 2);
    chk(h_east_out.aik == a && h_east_out.akk == y && h_west_out == h_east_out, "hsend");
    hw = '{aik: {$urandom, $urandom}, akk: {$urandom, $urandom}};
    h_west_in = hw; issue(CMD_HFWD, 0); h_west_in = '0;
    chk(h_east_out == hw, "hfwd right");
    hw = '{aik: {$urandom, $urandom}, akk: {$urandom, $urandom}};
    h_east_in = hw; issue(CMD_HFWD, 7); h_east_in = '0;
    chk(h_west_out == hw, "hfwd left");

    // determinant computation, pivot above-left
    for (int n = 0; n < 200; n++) begin
      word_t akk, aik, akj, expv;
      a   = (n < 100) ? word_t'($signed($urandom_range(0, 200)) - 100) : {$urandom, $urandom};
      akk = (n < 100) ? word_t'($signed($urandom_range(0, 200)) - 100) : {$urandom, $urandom};
      aik = (n < 100) ? word_t'($signed($urandom_range(0, 200)) - 100) : {$urandom, $urandom};
      akj = (n < 100) ? word_t'($signed($urandom_range(0, 200)) - 100) : {$urandom, $urandom};
      load_word(a);
      iterate(akk, aik, akj, 0, lat);
      expv = det(akk, a, aik, akj);
      chk(aij == expv, $sformatf("det %0d: got %h exp %h", n, aij, expv));
      chk(lat == 6, $sformatf("compute latency %0d", lat));
    end

    // pivot row: value kept
    a = 64'd12345;
    load_word(a);
    x = 64'd3;
    v_north_in = '0;
    issue(CMD_VSEND, 1);
    h_west_in = '{aik: 64'd9, akk: 64'd7};
    issue(CMD_HFWD, 0); h_west_in = '0;
    @(negedge clk); cmd = CMD_COMPUTE; k = 1;
    @(negedge clk); cmd = CMD_NOP;
    repeat (8) @(negedge clk);
    chk(done && aij == a, "pivot row hold");

    // capture and serial unload
    a = {$urandom, $urandom};
    load_word(a);
    issue(CMD_CAPTURE, 0);
    for (int b = REG_W - 1; b >= 0; b--) begin
      chk(ser_out == a[b], "unload bit");
      cmd = CMD_SHIFT; ser_in = 0;
      @(negedge clk);
    end
    cmd = CMD_NOP;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
