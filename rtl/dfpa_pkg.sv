// dfpa_pkg: types and constants shared by the Division-Free Parallel
// Architecture (DFPA), a grid of processor elements (PEs) that diagonalises an
// augmented matrix [A|b] with one-step division-free Gaussian elimination.
//
// DATA_W is the width of one coefficient as a multiplier operand (32 bits) and
// REG_W the width of a PE register, a product and a channel word (64 bits).
// The command set that the master broadcasts to every PE, and the horizontal
// channel word (a_ik together with a_kk), are this design's own encoding.
package dfpa_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned REG_W  = 2 * DATA_W;
  localparam int unsigned K_W    = 8;   // width of the pivot index and of grid positions

  typedef logic [REG_W-1:0] word_t;

  // Register map of the eight-register PE memory.
  typedef enum logic [2:0] {
    R_AKK  = 3'd0,  // pivot a_kk
    R_AKJ  = 3'd1,  // pivot-row element a_kj (arrives vertically)
    R_AIK  = 3'd2,  // pivot-column element a_ik (arrives horizontally)
    R_AIJ  = 3'd3,  // the PE's own coefficient a_ij
    R_P1   = 3'd4,  // a_kk * a_ij
    R_P2   = 3'd5,  // a_ik * a_kj
    R_SUM  = 3'd6,  // determinant a_kk*a_ij - a_ik*a_kj
    R_ID   = 3'd7   // PE identification number {row, col}
  } reg_addr_t;

  // Commands broadcast by the master to every PE.
  typedef enum logic [3:0] {
    CMD_NOP     = 4'd0,
    CMD_SHIFT   = 4'd1,  // shift the serial chain one bit east
    CMD_LATCH   = 4'd2,  // copy the serial register into a_ij
    CMD_VSEND   = 4'd3,  // pivot row puts a_kj on its vertical channels
    CMD_VFWD    = 4'd4,  // vertical channels forward one hop
    CMD_HSEND   = 4'd5,  // pivot column puts {a_ik, a_kk} on its horizontal channels
    CMD_HFWD    = 4'd6,  // horizontal channels forward one hop
    CMD_COMPUTE = 4'd7,  // start the determinant computation
    CMD_CAPTURE = 4'd8   // copy a_ij into the serial register for unloading
  } cmd_t;

  // Steps of the per-PE computation sequencer.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_MUL1 = 3'd1,  // latch a_kk, a_ij into the multiplier
    ST_MUL2 = 3'd2,  // store product 1, latch a_ik, a_kj
    ST_SUB  = 3'd3,  // store product 2
    ST_ADD  = 3'd4,  // store the difference
    ST_WB   = 3'd5   // write the difference back as the new a_ij
  } step_t;

  // Word carried along a row: the pivot-column element and the pivot.
  typedef struct packed {
    word_t aik;
    word_t akk;
  } hword_t;

  // Multiplier operand: low DATA_W bits of a register, as a signed value.
  function automatic logic signed [DATA_W-1:0] operand(input logic [DATA_W-1:0] w);
    return signed'(w);
  endfunction

endpackage
