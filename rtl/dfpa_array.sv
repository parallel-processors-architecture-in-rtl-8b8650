// dfpa_array: the ROWS x COLS grid of processor elements.
//
// PE (r, c) holds coefficient a_rc of the augmented matrix (ROWS = n
// equations, COLS = n + 1 columns including the right-hand side). Each PE is
// joined to its four neighbours: vertical channels run both ways along every
// column, horizontal channels both ways along every row, and a one-bit serial
// chain runs west to east along every row, entering at ser_in[r] and leaving
// at ser_out[r]. Channel inputs at the grid edges are tied to zero. The
// command and pivot index from the master reach every PE in the same cycle;
// all_done is the AND of the PEs' done flags. aij exposes each PE's current
// coefficient for observation. The grid and the neighbour channels follow the
// design's description; edge ties and the serial chain are this design's.
module dfpa_array
  import dfpa_pkg::*;
#(
  parameter int unsigned ROWS = 15,
  parameter int unsigned COLS = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  cmd_t           cmd,
  input  logic [K_W-1:0] k,
  input  logic [ROWS-1:0] ser_in,
  output logic [ROWS-1:0] ser_out,
  output logic           all_done,
  output word_t          aij [ROWS][COLS]
);
  word_t  v_n_out [ROWS][COLS];
  word_t  v_s_out [ROWS][COLS];
  hword_t h_w_out [ROWS][COLS];
  hword_t h_e_out [ROWS][COLS];
  logic   s_out   [ROWS][COLS];
  logic [ROWS*COLS-1:0] done_v;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      word_t  v_n_in, v_s_in;
      hword_t h_w_in, h_e_in;
      logic   s_in;

      localparam int unsigned RN = (r > 0)        ? r - 1 : 0;
      localparam int unsigned RS = (r < ROWS - 1) ? r + 1 : r;
      localparam int unsigned CW = (c > 0)        ? c - 1 : 0;
      localparam int unsigned CE = (c < COLS - 1) ? c + 1 : c;

      assign v_n_in = (r > 0)        ? v_s_out[RN][c] : '0;
      assign v_s_in = (r < ROWS - 1) ? v_n_out[RS][c] : '0;
      assign h_w_in = (c > 0)        ? h_e_out[r][CW] : '0;
      assign h_e_in = (c < COLS - 1) ? h_w_out[r][CE] : '0;
      assign s_in   = (c > 0)        ? s_out[r][CW]   : ser_in[r];

      dfpa_pe #(.ROW(r), .COL(c)) u_pe (
        .clk, .rst, .cmd, .k,
        .v_north_in (v_n_in),
        .v_south_in (v_s_in),
        .v_north_out(v_n_out[r][c]),
        .v_south_out(v_s_out[r][c]),
        .h_west_in  (h_w_in),
        .h_east_in  (h_e_in),
        .h_west_out (h_w_out[r][c]),
        .h_east_out (h_e_out[r][c]),
        .ser_in     (s_in),
        .ser_out    (s_out[r][c]),
        .done       (done_v[r*COLS+c]),
        .aij        (aij[r][c])
      );
    end
    assign ser_out[r] = s_out[r][COLS-1];
  end

  assign all_done = &done_v;
endmodule
