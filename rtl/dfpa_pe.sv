// dfpa_pe: processor element of the Division-Free Parallel Architecture.
//
// PE (ROW, COL) holds one coefficient a_ij of the augmented matrix and, in
// iteration k, replaces it by the 2x2 determinant
//     a_ij' = a_kk * a_ij - a_ik * a_kj        (rows i != k; row k is kept).
// It is built from a signed multiplier (used twice), an adder-subtractor, an
// eight-register memory (a_kk, a_kj, a_ik, a_ij, two products, the difference,
// the PE's {row, col} identification number), a 64-bit serial input/output
// register and a small sequencer.
//
// All PEs obey one broadcast command (cmd) and pivot index (k):
//   SHIFT   - the serial register shifts one bit (row-wide chain, west to east)
//   LATCH   - a_ij <= serial register
//   VSEND   - the pivot row (ROW == k) puts a_kj on both vertical outputs
//   VFWD    - rows below k copy the north input to the south output, rows
//             above k copy the south input to the north output; each stores
//             the word as a_kj. After ROWS-1 hops every column holds a_kj.
//   HSEND   - the pivot column (COL == k) puts {a_ik, a_kk} on both
//             horizontal outputs (its a_kj register holds a_kk)
//   HFWD    - the same along rows, storing a_ik and a_kk
//   COMPUTE - start the five-step determinant sequence; done rises after it
//   CAPTURE - serial register <= a_ij, ready to be shifted out
// Channel outputs are registered: one hop per clock. Operands given to the
// multiplier are the low 32 bits of a register, sign-extended; the difference
// is kept at 64 bits. The data flow (row k down/up the columns, column k and
// a_kk along the rows) follows the design's description; the command set,
// registered word-parallel links and two-way forwarding are this design's.
module dfpa_pe
  import dfpa_pkg::*;
#(
  parameter int unsigned ROW = 0,
  parameter int unsigned COL = 0
) (
  input  logic          clk,
  input  logic          rst,
  input  cmd_t          cmd,
  input  logic [K_W-1:0] k,
  // vertical channels (column)
  input  word_t         v_north_in,
  input  word_t         v_south_in,
  output word_t         v_north_out,
  output word_t         v_south_out,
  // horizontal channels (row)
  input  hword_t        h_west_in,
  input  hword_t        h_east_in,
  output hword_t        h_west_out,
  output hword_t        h_east_out,
  // serial chain
  input  logic          ser_in,
  output logic          ser_out,
  output logic          done,
  output word_t         aij
);
  localparam word_t ID = word_t'({K_W'(ROW), K_W'(COL)});

  logic [7:0][REG_W-1:0] q;
  logic        we0, we1;
  logic [2:0]  wa0, wa1;
  word_t       wd0, wd1;

  logic [K_W-1:0] my_row, my_col;
  logic        in_prow, in_pcol, below, right;

  step_t       step;
  logic        wb_en, ctl_start;

  logic        mul_ce;
  logic signed [DATA_W-1:0] mul_a, mul_b;
  logic signed [REG_W-1:0]  prod;
  word_t       diff;

  word_t       sio_q;
  logic        sio_ce, sio_pload;

  // Position from the identification register.
  assign my_row  = q[R_ID][2*K_W-1:K_W];
  assign my_col  = q[R_ID][K_W-1:0];
  assign in_prow = (my_row == k);
  assign in_pcol = (my_col == k);
  assign below   = (my_row > k);
  assign right   = (my_col > k);

  dfpa_regfile #(.W(REG_W), .ID_INIT(ID)) u_mem (
    .clk, .rst, .we0, .wa0, .wd0, .we1, .wa1, .wd1, .q
  );

  dfpa_mult #(.W(DATA_W)) u_mul (
    .clk, .rst, .ce(mul_ce), .a(mul_a), .b(mul_b), .p(prod)
  );

  dfpa_addsub #(.W(REG_W)) u_add (
    .a(q[R_P1]), .b(q[R_P2]), .sub(1'b1), .s(diff)
  );

  dfpa_serial_io #(.W(REG_W)) u_sio (
    .clk, .rst, .si(ser_in), .ce(sio_ce), .pload(sio_pload), .pd(q[R_AIJ]),
    .q(sio_q), .so(ser_out)
  );

  dfpa_pe_control u_ctl (
    .clk, .rst, .start(ctl_start), .hold(in_prow), .step, .wb_en, .done
  );

  assign ctl_start = (cmd == CMD_COMPUTE);
  assign sio_ce    = (cmd == CMD_SHIFT);
  assign sio_pload = (cmd == CMD_CAPTURE);

  // Multiplier operand selection and memory writes.
  always_comb begin
    mul_ce = 1'b0;
    mul_a  = operand(q[R_AKK][DATA_W-1:0]);
    mul_b  = operand(q[R_AIJ][DATA_W-1:0]);
    we0 = 1'b0; wa0 = R_AIJ; wd0 = '0;
    we1 = 1'b0; wa1 = R_AKK; wd1 = '0;

    unique case (step)
      ST_MUL1: mul_ce = 1'b1;
      ST_MUL2: begin
        we0 = 1'b1; wa0 = R_P1; wd0 = prod;
        mul_ce = 1'b1;
        mul_a  = operand(q[R_AIK][DATA_W-1:0]);
        mul_b  = operand(q[R_AKJ][DATA_W-1:0]);
      end
      ST_SUB: begin we0 = 1'b1; wa0 = R_P2;  wd0 = prod; end
      ST_ADD: begin we0 = 1'b1; wa0 = R_SUM; wd0 = diff; end
      ST_WB:  begin we0 = wb_en; wa0 = R_AIJ; wd0 = q[R_SUM]; end
      default: ;
    endcase

    unique case (cmd)
      CMD_LATCH: begin we0 = 1'b1; wa0 = R_AIJ; wd0 = sio_q; end
      CMD_VSEND: if (in_prow) begin we0 = 1'b1; wa0 = R_AKJ; wd0 = q[R_AIJ]; end
      CMD_VFWD: begin
        if (below) begin
          we0 = 1'b1; wa0 = R_AKJ; wd0 = v_north_in;
        end else if (!in_prow) begin
          we0 = 1'b1; wa0 = R_AKJ; wd0 = v_south_in;
        end
      end
      CMD_HSEND: if (in_pcol) begin
        we0 = 1'b1; wa0 = R_AIK; wd0 = q[R_AIJ];
        we1 = 1'b1; wa1 = R_AKK; wd1 = q[R_AKJ];
      end
      CMD_HFWD: begin
        if (right) begin
          we0 = 1'b1; wa0 = R_AIK; wd0 = h_west_in.aik;
          we1 = 1'b1; wa1 = R_AKK; wd1 = h_west_in.akk;
        end else if (!in_pcol) begin
          we0 = 1'b1; wa0 = R_AIK; wd0 = h_east_in.aik;
          we1 = 1'b1; wa1 = R_AKK; wd1 = h_east_in.akk;
        end
      end
      default: ;
    endcase
  end

  // Registered channel outputs: one hop per clock.
  always_ff @(posedge clk) begin
    if (rst) begin
      v_north_out <= '0;
      v_south_out <= '0;
      h_west_out  <= '0;
      h_east_out  <= '0;
    end else begin
      unique case (cmd)
        CMD_VSEND: if (in_prow) begin
          v_north_out <= q[R_AIJ];
          v_south_out <= q[R_AIJ];
        end
        CMD_VFWD: begin
          if (below)             v_south_out <= v_north_in;
          else if (!in_prow)     v_north_out <= v_south_in;
        end
        CMD_HSEND: if (in_pcol) begin
          h_west_out <= '{aik: q[R_AIJ], akk: q[R_AKJ]};
          h_east_out <= '{aik: q[R_AIJ], akk: q[R_AKJ]};
        end
        CMD_HFWD: begin
          if (right)             h_east_out <= h_west_in;
          else if (!in_pcol)     h_west_out <= h_east_in;
        end
        default: ;
      endcase
    end
  end

  assign aij = q[R_AIJ];

  // Broadcast commands never arrive while the sequencer is busy.
  a_no_cmd_while_busy: assert property (@(posedge clk) disable iff (rst)
    (step != ST_IDLE) |-> (cmd == CMD_NOP));
endmodule
