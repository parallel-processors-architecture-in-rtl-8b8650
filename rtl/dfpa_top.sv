// dfpa_top: Division-Free Parallel Architecture for linear systems.
//
// Solves A x = b for an N x N system by reducing the augmented matrix [A|b]
// to diagonal form with one-step division-free Gaussian elimination: in
// iteration k every element outside row k becomes the 2x2 determinant
// a_kk*a_ij - a_ik*a_kj, and row k is kept. N x (N+1) processor elements
// (240 for the default N = 15) each compute one determinant per iteration, so
// an iteration costs a fixed number of cycles plus the channel hops.
//
// Interface: pulse start while idle. While load_en is high the host presents
// one bit per equation row on ser_in each clock: the 64-bit two's-complement
// word of column N first, down to column 0, each word MSB first (low 32 bits
// are used as a multiplier operand). After the elimination, while
// unload_valid is high, ser_out carries the 64-bit results in the same order.
// done pulses once at the end. The host computes x_i = a_i,N / a_ii from the
// diagonal result; the array itself never divides.
module dfpa_top
  import dfpa_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           load_en,
  input  logic [N-1:0]   ser_in,
  output logic           unload_valid,
  output logic [N-1:0]   ser_out,
  output logic [K_W-1:0] iter
);
  localparam int unsigned ROWS = N;
  localparam int unsigned COLS = N + 1;

  cmd_t  cmd;
  logic  all_done;
  word_t aij [ROWS][COLS];

  dfpa_master #(.ROWS(ROWS), .COLS(COLS)) u_master (
    .clk, .rst, .start, .pe_done(all_done), .cmd, .k(iter),
    .load_en, .unload_valid, .busy, .done
  );

  dfpa_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst, .cmd, .k(iter), .ser_in, .ser_out, .all_done, .aij
  );
endmodule
