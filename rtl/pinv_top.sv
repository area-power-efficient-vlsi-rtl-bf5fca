// pinv_top: pseudo-inverse module for an N x M MIMO channel (default 4 x 4).
//
// Computes, by the square-root algorithm for MMSE-VBLAST, the two factors
// P^(1/2) (M x M) and Q_a (N x M) of the augmented channel matrix
// [H; sqrt(alpha) I] = Q R, with P^(1/2) = R^-1 up to a unitary factor on the
// right and Q_a = H P^(1/2), so that P^(1/2) P^(*/2) = (H^* H + alpha I)^-1
// and the MMSE pseudo-inverse is P^(1/2) Q_a^*.
//
// Datapath: two identical 13-cell pipelined CORDICs, each able to vector or
// rotate sample by sample and each feeding its own angle back as its z input;
// a complex MAC with four real multipliers for the leader row H_i P^(1/2);
// a dual-port RAM holding the working array; and pinv_ctrl, which sequences
// the passes and steers data between RAM, CORDICs and MAC. There is no third
// CORDIC dedicated to angle calculation: the same two pipelines do vectoring
// and rotation.
//
// Interface: pulse start while idle with inv_sqrt_alpha = 1/sqrt(alpha) in
// 16Q8. The module reads H(i,k) through h_rd / h_row / h_col, expecting
// h_data one cycle later. Results leave as beats of two entries
// (out_row: 0..M-1 rows of P^(1/2), M..M+N-1 rows of Q_a; out_col: first of
// the two columns); done pulses after the last beat. All data is 16Q8
// complex {re, im}. Latency for M = N = 4 is 1098 cycles from start to done.
module pinv_top
  import pinv_pkg::*;
#(
  parameter int unsigned M = M_TX,
  parameter int unsigned N = N_RX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  word_t                  inv_sqrt_alpha,
  output logic                   busy,
  output logic                   done,
  output logic                   h_rd,
  output logic [$clog2(N)-1:0]   h_row,
  output logic [$clog2(M)-1:0]   h_col,
  input  cplx_t                  h_data,
  output logic                   out_valid,
  output logic [$clog2(M+N)-1:0] out_row,
  output logic [$clog2(M)-1:0]   out_col,
  output cplx_t [1:0]            out_data
);

  localparam int unsigned R     = 1 + M + N;
  localparam int unsigned DEPTH = R * (M + 1);
  localparam int unsigned ABITS = $clog2(DEPTH);

  logic             a_en, a_we, b_en, b_we;
  logic [ABITS-1:0] a_addr, b_addr;
  cplx_t            a_wdata, a_rdata, b_wdata, b_rdata;

  logic                 c1_valid, c2_valid, c1o_valid, c2o_valid;
  cordic_mode_e         c1_mode, c2_mode, c1o_mode, c2o_mode;
  word_t                c1_x, c1_y, c2_x, c2_y, c1o_x, c1o_y, c2o_x, c2o_y;
  logic signed [AW-1:0] c1_z, c2_z, c1o_z, c2o_z;

  logic                   m_valid, m_clr, m_last, m_out_valid;
  cplx_t                  m_a, m_b;
  logic signed [2*DW-1:0] m_acc_re, m_acc_im;

  pinv_ctrl #(.M(M), .N(N)) u_ctrl (
    .clk, .rst_n, .start, .inv_sqrt_alpha, .busy, .done,
    .h_rd, .h_row, .h_col, .h_data,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata,
    .c1_valid, .c1_mode, .c1_x, .c1_y, .c1_z,
    .c1o_valid, .c1o_x, .c1o_y, .c1o_z,
    .c2_valid, .c2_mode, .c2_x, .c2_y, .c2_z,
    .c2o_valid, .c2o_x, .c2o_y, .c2o_z,
    .m_valid, .m_clr, .m_last, .m_a, .m_b,
    .m_out_valid, .m_acc_re, .m_acc_im,
    .out_valid, .out_row, .out_col, .out_data
  );

  cordic_pipe u_cordic1 (
    .clk, .rst_n,
    .in_valid (c1_valid), .in_mode (c1_mode),
    .in_x (c1_x), .in_y (c1_y), .in_z (c1_z),
    .out_valid (c1o_valid), .out_mode (c1o_mode),
    .out_x (c1o_x), .out_y (c1o_y), .out_z (c1o_z)
  );

  cordic_pipe u_cordic2 (
    .clk, .rst_n,
    .in_valid (c2_valid), .in_mode (c2_mode),
    .in_x (c2_x), .in_y (c2_y), .in_z (c2_z),
    .out_valid (c2o_valid), .out_mode (c2o_mode),
    .out_x (c2o_x), .out_y (c2o_y), .out_z (c2o_z)
  );

  cmac u_mac (
    .clk, .rst_n,
    .in_valid (m_valid), .in_clr (m_clr), .in_last (m_last),
    .a (m_a), .b (m_b),
    .out_valid (m_out_valid), .acc_re (m_acc_re), .acc_im (m_acc_im)
  );

  dpram #(.DEPTH(DEPTH)) u_ram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  // Both pipelines always carry samples of the mode they were given.
  a_mode_match: assert property (@(posedge clk) disable iff (!rst_n)
      c1o_valid |-> c1o_mode == c2o_mode)
    else $error("pinv_top: CORDIC modes differ at the outputs");

endmodule
