// dfpa_master: master processor and data sending controller.
//
// Sequences one solve of an n-equation system on the PE grid by broadcasting
// a command and the pivot index k to every PE:
//   LOAD    REG_W x COLS cycles of SHIFT; load_en tells the host to present
//           one bit per row on ser_in (word for column COLS-1 first, MSB first)
//   LATCH   every PE copies its serial register into a_ij
//   for k = 0 .. ROWS-1:
//     VSEND, then VFWD for ROWS-1 cycles   (row k down and up the columns)
//     HSEND, then HFWD for COLS-1 cycles   (column k and a_kk along the rows)
//     COMPUTE, then wait until every PE reports done
//   CAPTURE every PE copies a_ij into its serial register
//   UNLOAD  REG_W x COLS cycles of SHIFT with unload_valid; ser_out carries
//           the results, column COLS-1 first, MSB first
//   DONE    one-cycle done pulse
// busy stays high for 2*REG_W*COLS + ROWS*(ROWS+COLS+7) + 3 cycles, the
// last of them the done pulse; each iteration costs ROWS+COLS+7 cycles. Bit, word, hop and iteration counts come
// from four data sending counters. The phase order follows the design's
// description of horizontal and vertical processing; the exact schedule,
// host handshake and command set are this design's.
module dfpa_master
  import dfpa_pkg::*;
#(
  parameter int unsigned ROWS = 15,
  parameter int unsigned COLS = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           pe_done,
  output cmd_t           cmd,
  output logic [K_W-1:0] k,
  output logic           load_en,
  output logic           unload_valid,
  output logic           busy,
  output logic           done
);
  typedef enum logic [3:0] {
    M_IDLE, M_LOAD, M_LATCH, M_VSEND, M_VFWD, M_HSEND, M_HFWD,
    M_COMP, M_WAIT, M_CAPTURE, M_UNLOAD, M_DONE
  } mstate_t;

  localparam logic [K_W-1:0] BIT_LAST  = K_W'(REG_W - 1);
  localparam logic [K_W-1:0] WORD_LAST = K_W'(COLS - 1);
  localparam logic [K_W-1:0] VHOP_LAST = K_W'((ROWS > 1) ? ROWS - 2 : 0);
  localparam logic [K_W-1:0] HHOP_LAST = K_W'((COLS > 1) ? COLS - 2 : 0);
  localparam logic [K_W-1:0] ITER_LAST = K_W'(ROWS - 1);

  mstate_t state, nstate;
  logic shifting, bit_en, bit_c, word_c, hop_en, hop_c, iter_en, iter_c, clr;
  logic [K_W-1:0] bit_cnt, word_cnt, hop_cnt, hop_last;

  assign shifting = (state == M_LOAD) || (state == M_UNLOAD);
  assign bit_en   = shifting;
  assign hop_en   = (state == M_VFWD) || (state == M_HFWD);
  assign hop_last = (state == M_VFWD) ? VHOP_LAST : HHOP_LAST;
  assign iter_en  = (state == M_WAIT) && pe_done;
  assign clr      = rst || (state == M_IDLE);

  dfpa_send_counter #(.W(K_W)) u_bit  (.clk, .rst(clr), .en(bit_en), .last(BIT_LAST),
                                       .count(bit_cnt), .c(bit_c));
  dfpa_send_counter #(.W(K_W)) u_word (.clk, .rst(clr), .en(bit_c), .last(WORD_LAST),
                                       .count(word_cnt), .c(word_c));
  dfpa_send_counter #(.W(K_W)) u_hop  (.clk, .rst(clr), .en(hop_en), .last(hop_last),
                                       .count(hop_cnt), .c(hop_c));
  dfpa_send_counter #(.W(K_W)) u_iter (.clk, .rst(clr), .en(iter_en), .last(ITER_LAST),
                                       .count(k), .c(iter_c));

  always_comb begin
    nstate = state;
    cmd    = CMD_NOP;
    unique case (state)
      M_IDLE:    if (start) nstate = M_LOAD;
      M_LOAD:    begin cmd = CMD_SHIFT; if (word_c) nstate = M_LATCH; end
      M_LATCH:   begin cmd = CMD_LATCH; nstate = M_VSEND; end
      M_VSEND:   begin cmd = CMD_VSEND; nstate = (ROWS > 1) ? M_VFWD : M_HSEND; end
      M_VFWD:    begin cmd = CMD_VFWD;  if (hop_c) nstate = M_HSEND; end
      M_HSEND:   begin cmd = CMD_HSEND; nstate = (COLS > 1) ? M_HFWD : M_COMP; end
      M_HFWD:    begin cmd = CMD_HFWD;  if (hop_c) nstate = M_COMP; end
      M_COMP:    begin cmd = CMD_COMPUTE; nstate = M_WAIT; end
      M_WAIT:    if (pe_done) nstate = iter_c ? M_CAPTURE : M_VSEND;
      M_CAPTURE: begin cmd = CMD_CAPTURE; nstate = M_UNLOAD; end
      M_UNLOAD:  begin cmd = CMD_SHIFT; if (word_c) nstate = M_DONE; end
      M_DONE:    nstate = M_IDLE;
      default:   nstate = M_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= M_IDLE;
    else     state <= nstate;
  end

  assign load_en      = (state == M_LOAD);
  assign unload_valid = (state == M_UNLOAD);
  assign busy         = (state != M_IDLE);
  assign done         = (state == M_DONE);

  // The pivot index never leaves the grid.
  a_k_in_range: assert property (@(posedge clk) disable iff (rst) k <= ITER_LAST);
endmodule
